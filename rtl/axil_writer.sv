// axil_writer: AXI4-Lite write slave that collects a 128-bit command.
//
// The write-address (AW) and write-data (W) channels each pass through a
// skid_buffer, so AWREADY and WREADY come from flip-flops and the two
// channels may arrive in any order or cycle. A write is executed in the
// cycle in which both buffers present a beat, the write-response slot is
// free (BVALID low or BREADY high) and no finished command is still waiting
// for the NoC interface (Acc_cmd_valid high with Acc_cmd_ready low). The
// address is decoded into enable_0..enable_3, which load reg_0..reg_3
// (outputs bit_0..bit_3). The words may be written in any order, but 0x6c
// is the last word of a command: writing it sets the last_word register,
// which is Acc_cmd_valid, held until Acc_cmd_ready. A write to any other
// address loads nothing and raises no command.
//
// Timing: with a ready consumer one write completes per clock; BVALID
// rises the clock after the write is executed, BRESP is always OKAY (00).
// Ports are named as in the writer's block diagram. Following the design
// description: skid buffers on AW and W, four 32-bit registers, last word
// at 0x6c, BRESP fixed to 00. This design's own choices: invalid addresses
// still get a B response (so the bus never hangs), writes stall while a
// command is waiting, WSTRB/AWPROT are not implemented, synchronous
// active-low reset clears all registers.
module axil_writer
  import axil_pkg::*;
#(
  parameter int unsigned ADDR_W = AXI_ADDR_W,
  parameter int unsigned DATA_W = AXI_DATA_W
) (
  input  logic              clk,
  input  logic              rstn,
  // AXI4-Lite write address channel
  input  logic [ADDR_W-1:0] S_AXI_AWADDR,
  input  logic              S_AXI_AWVALID,
  output logic              S_AXI_AWREADY,
  // AXI4-Lite write data channel
  input  logic [DATA_W-1:0] S_AXI_WDATA,
  input  logic              S_AXI_WVALID,
  output logic              S_AXI_WREADY,
  // AXI4-Lite write response channel
  output logic              S_AXI_BVALID,
  output logic [1:0]        S_AXI_BRESP,
  input  logic              S_AXI_BREADY,
  // command registers towards the NoC interface
  output logic [DATA_W-1:0] bit_0,
  output logic [DATA_W-1:0] bit_1,
  output logic [DATA_W-1:0] bit_2,
  output logic [DATA_W-1:0] bit_3,
  output logic              Acc_cmd_valid,
  input  logic              Acc_cmd_ready
);

  logic [ADDR_W-1:0] aw_addr;
  logic              aw_valid;
  logic [DATA_W-1:0] w_data;
  logic              w_valid;
  logic              wr_fire;
  logic              b_free;
  logic              cmd_stall;
  logic [N_REGS-1:0] enable;
  reg_idx_e          idx;
  logic              hit;

  skid_buffer #(.DW(ADDR_W)) u_aw_skid (
    .clk    (clk),
    .rstn   (rstn),
    .S_data (S_AXI_AWADDR),
    .S_valid(S_AXI_AWVALID),
    .S_ready(S_AXI_AWREADY),
    .M_data (aw_addr),
    .M_valid(aw_valid),
    .M_ready(wr_fire)
  );

  skid_buffer #(.DW(DATA_W)) u_w_skid (
    .clk    (clk),
    .rstn   (rstn),
    .S_data (S_AXI_WDATA),
    .S_valid(S_AXI_WVALID),
    .S_ready(S_AXI_WREADY),
    .M_data (w_data),
    .M_valid(w_valid),
    .M_ready(wr_fire)
  );

  axil_addr_decoder u_dec (
    .addr  (aw_addr),
    .enable(enable),
    .idx   (idx),
    .hit   (hit)
  );

  assign b_free    = !S_AXI_BVALID || S_AXI_BREADY;
  assign cmd_stall = Acc_cmd_valid && !Acc_cmd_ready;
  assign wr_fire   = aw_valid && w_valid && b_free && !cmd_stall;

  // reg_0 .. reg_3
  always_ff @(posedge clk) begin
    if (!rstn) begin
      bit_0 <= '0;
      bit_1 <= '0;
      bit_2 <= '0;
      bit_3 <= '0;
    end else if (wr_fire) begin
      if (enable[0]) bit_0 <= w_data;
      if (enable[1]) bit_1 <= w_data;
      if (enable[2]) bit_2 <= w_data;
      if (enable[3]) bit_3 <= w_data;
    end
  end

  // last_word: a write to 0x6c completes the command
  always_ff @(posedge clk) begin
    if (!rstn) begin
      Acc_cmd_valid <= 1'b0;
    end else if (wr_fire && enable[3]) begin
      Acc_cmd_valid <= 1'b1;
    end else if (Acc_cmd_ready) begin
      Acc_cmd_valid <= 1'b0;
    end
  end

  // write response
  always_ff @(posedge clk) begin
    if (!rstn) begin
      S_AXI_BVALID <= 1'b0;
    end else if (wr_fire) begin
      S_AXI_BVALID <= 1'b1;
    end else if (S_AXI_BREADY) begin
      S_AXI_BVALID <= 1'b0;
    end
  end

  assign S_AXI_BRESP = RESP_OKAY;

  // the register index and hit flag are informative only on the write side
  logic unused_ok;
  assign unused_ok = ^{idx, hit, enable[4]};

endmodule
