// axil_reader: AXI4-Lite read slave for the command registers and status.
//
// The read-address (AR) channel passes through a skid_buffer, so ARREADY
// comes from a flip-flop. A read is executed when the buffer presents an
// address and the read-data slot is free (RVALID low or RREADY high). The
// address is decoded into enable_0..enable_4: 0x60..0x6c return the four
// command words held by the writer, 0x70 returns the 8-bit status byte from
// the NoC interface padded with 24 zero bits at the MSB end. A 0x70 read
// pulses Acc_status_ready in the cycle it is executed, which consumes the
// status byte if Acc_status_valid was high; with no status pending it
// returns 0. Any other address returns 0.
//
// Timing: RVALID/RDATA are registered and appear the clock after the read is
// executed; with RREADY held high one read completes per clock. RRESP is
// always OKAY (00). Ports are named as in the reader's block diagram.
// Following the design description: one skid buffer on AR only, five
// readable addresses, zero-extension of the status, RRESP fixed to 00. This
// design's own choices: invalid addresses and an empty status read return
// 0 with a normal response, ARPROT is not implemented, synchronous
// active-low reset.
module axil_reader
  import axil_pkg::*;
#(
  parameter int unsigned ADDR_W   = AXI_ADDR_W,
  parameter int unsigned DATA_W   = AXI_DATA_W,
  parameter int unsigned STATUS_W = STAT_W
) (
  input  logic                clk,
  input  logic                rstn,
  // AXI4-Lite read address channel
  input  logic [ADDR_W-1:0]   S_AXI_ARADDR,
  input  logic                S_AXI_ARVALID,
  output logic                S_AXI_ARREADY,
  // AXI4-Lite read data channel
  output logic                S_AXI_RVALID,
  input  logic                S_AXI_RREADY,
  output logic [DATA_W-1:0]   S_AXI_RDATA,
  output logic [1:0]          S_AXI_RRESP,
  // read-back of the command registers
  input  logic [DATA_W-1:0]   bit_0,
  input  logic [DATA_W-1:0]   bit_1,
  input  logic [DATA_W-1:0]   bit_2,
  input  logic [DATA_W-1:0]   bit_3,
  // status byte from the NoC interface
  input  logic [STATUS_W-1:0] status_bit,
  input  logic                Acc_status_valid,
  output logic                Acc_status_ready
);

  logic [ADDR_W-1:0] ar_addr;
  logic              ar_valid;
  logic              rd_fire;
  logic [N_REGS-1:0] enable;
  reg_idx_e          idx;
  logic              hit;
  logic [DATA_W-1:0] rd_mux;

  skid_buffer #(.DW(ADDR_W)) u_ar_skid (
    .clk    (clk),
    .rstn   (rstn),
    .S_data (S_AXI_ARADDR),
    .S_valid(S_AXI_ARVALID),
    .S_ready(S_AXI_ARREADY),
    .M_data (ar_addr),
    .M_valid(ar_valid),
    .M_ready(rd_fire)
  );

  axil_addr_decoder u_dec (
    .addr  (ar_addr),
    .enable(enable),
    .idx   (idx),
    .hit   (hit)
  );

  assign rd_fire = ar_valid && (!S_AXI_RVALID || S_AXI_RREADY);

  always_comb begin
    rd_mux = '0;
    unique case (idx)
      REG_CMD0:   rd_mux = bit_0;
      REG_CMD1:   rd_mux = bit_1;
      REG_CMD2:   rd_mux = bit_2;
      REG_CMD3:   rd_mux = bit_3;
      REG_STATUS: if (Acc_status_valid) rd_mux = {{(DATA_W-STATUS_W){1'b0}}, status_bit};
      default:    rd_mux = '0;
    endcase
  end

  assign Acc_status_ready = rd_fire && enable[4];

  always_ff @(posedge clk) begin
    if (!rstn) begin
      S_AXI_RVALID <= 1'b0;
      S_AXI_RDATA  <= '0;
    end else if (rd_fire) begin
      S_AXI_RVALID <= 1'b1;
      S_AXI_RDATA  <= rd_mux;
    end else if (S_AXI_RREADY) begin
      S_AXI_RVALID <= 1'b0;
    end
  end

  assign S_AXI_RRESP = RESP_OKAY;

  logic unused_ok;
  assign unused_ok = ^{hit, enable[3:0]};

endmodule
