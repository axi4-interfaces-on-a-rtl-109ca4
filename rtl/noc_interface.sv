// noc_interface: hand-over between the AXI4-Lite slave and the NoC.
//
// Command direction: when the writer raises Acc_cmd_valid, the four 32-bit
// words bit_0..bit_3 are packed into one 128-bit packet (bit_0 -> [31:0],
// bit_1 -> [63:32], bit_2 -> [95:64], bit_3 -> [127:96]) and registered on
// GPP_CMD_data with GPP_CMD_Flag high. Flag and data stay unchanged until
// the NoC answers NOC_CMD_ACK. Acc_cmd_ready is high while the output
// register is empty or is being acknowledged in this cycle, so a new packet
// can follow the previous one without a bubble.
// Status direction: an 8-bit NOC_CMD_data word offered with NOC_CMD_Flag is
// accepted when GPP_CMD_ACK is high (status register empty), held on
// status_bit with Acc_status_valid high, and released when the reader
// answers Acc_status_ready.
//
// Timing: one clock from Acc_cmd_valid&&Acc_cmd_ready to GPP_CMD_Flag, one
// clock from NOC_CMD_Flag&&GPP_CMD_ACK to Acc_status_valid. Ports and
// directions follow the interface's block diagram; the packing order and the
// valid-held-until-ack rule follow the design description. The one-entry
// registers on each side and the ready equations are this design's own.
module noc_interface
  import axil_pkg::*;
#(
  parameter int unsigned DATA_W   = AXI_DATA_W,
  parameter int unsigned CMD_W    = PKT_W,
  parameter int unsigned STATUS_W = STAT_W
) (
  input  logic                clk,
  input  logic                rstn,
  // from / to the writer
  input  logic [DATA_W-1:0]   bit_0,
  input  logic [DATA_W-1:0]   bit_1,
  input  logic [DATA_W-1:0]   bit_2,
  input  logic [DATA_W-1:0]   bit_3,
  input  logic                Acc_cmd_valid,
  output logic                Acc_cmd_ready,
  // to / from the reader
  output logic [STATUS_W-1:0] status_bit,
  output logic                Acc_status_valid,
  input  logic                Acc_status_ready,
  // NoC command channel
  output logic [CMD_W-1:0]    GPP_CMD_data,
  output logic                GPP_CMD_Flag,
  input  logic                NOC_CMD_ACK,
  // NoC status channel
  input  logic [STATUS_W-1:0] NOC_CMD_data,
  input  logic                NOC_CMD_Flag,
  output logic                GPP_CMD_ACK
);

  // ---- command packet towards the NoC ----
  assign Acc_cmd_ready = !GPP_CMD_Flag || NOC_CMD_ACK;

  always_ff @(posedge clk) begin
    if (!rstn) begin
      GPP_CMD_Flag <= 1'b0;
      GPP_CMD_data <= '0;
    end else if (Acc_cmd_valid && Acc_cmd_ready) begin
      GPP_CMD_Flag <= 1'b1;
      GPP_CMD_data <= CMD_W'({bit_3, bit_2, bit_1, bit_0});
    end else if (NOC_CMD_ACK) begin
      GPP_CMD_Flag <= 1'b0;
    end
  end

  // ---- status byte from the NoC ----
  assign GPP_CMD_ACK = !Acc_status_valid;

  always_ff @(posedge clk) begin
    if (!rstn) begin
      Acc_status_valid <= 1'b0;
      status_bit       <= '0;
    end else if (NOC_CMD_Flag && GPP_CMD_ACK) begin
      Acc_status_valid <= 1'b1;
      status_bit       <= NOC_CMD_data;
    end else if (Acc_status_ready) begin
      Acc_status_valid <= 1'b0;
    end
  end

endmodule
