// axil_noc_wrapper: AXI4-Lite control slave of a DNN accelerator NoC.
//
// A host processor (AXI4-Lite master) programs accelerator commands by
// writing four 32-bit words to 0x60, 0x64, 0x68 and 0x6c; the write to
// 0x6c completes a command, and the four words leave towards the NoC as one
// 128-bit packet on GPP_CMD_data with GPP_CMD_Flag held until NOC_CMD_ACK.
// In the other direction, 8-bit status bytes sent by the NoC on
// NOC_CMD_data/NOC_CMD_Flag (accepted with GPP_CMD_ACK) are read by the host
// at 0x70, zero-extended to 32 bits. Reads of 0x60..0x6c return the command
// words last written. Read and write channels are independent, so reads
// and writes proceed at the same time.
//
// Structure: axil_writer (AW and W skid buffers, decoder, reg_0..reg_3,
// last_word), axil_reader (AR skid buffer, decoder, read mux) and
// noc_interface (packet and status registers). All ports are plain signals;
// clk rising edge, rstn active-low synchronous reset. Throughput: one write
// and one read per clock when the master and the NoC keep their ready
// signals high. The split into writer, reader and NoC interface and all
// port names follow the design description; the read-back path of the
// command words into the reader is this design's own wiring.
module axil_noc_wrapper
  import axil_pkg::*;
#(
  parameter int unsigned ADDR_W   = AXI_ADDR_W,
  parameter int unsigned DATA_W   = AXI_DATA_W,
  parameter int unsigned CMD_W    = PKT_W,
  parameter int unsigned STATUS_W = STAT_W
) (
  input  logic                clk,
  input  logic                rstn,
  // AXI4-Lite slave: write
  input  logic [ADDR_W-1:0]   S_AXI_AWADDR,
  input  logic                S_AXI_AWVALID,
  output logic                S_AXI_AWREADY,
  input  logic [DATA_W-1:0]   S_AXI_WDATA,
  input  logic                S_AXI_WVALID,
  output logic                S_AXI_WREADY,
  output logic                S_AXI_BVALID,
  output logic [1:0]          S_AXI_BRESP,
  input  logic                S_AXI_BREADY,
  // AXI4-Lite slave: read
  input  logic [ADDR_W-1:0]   S_AXI_ARADDR,
  input  logic                S_AXI_ARVALID,
  output logic                S_AXI_ARREADY,
  output logic                S_AXI_RVALID,
  input  logic                S_AXI_RREADY,
  output logic [DATA_W-1:0]   S_AXI_RDATA,
  output logic [1:0]          S_AXI_RRESP,
  // NoC command and status channels
  output logic [CMD_W-1:0]    GPP_CMD_data,
  output logic                GPP_CMD_Flag,
  input  logic                NOC_CMD_ACK,
  input  logic [STATUS_W-1:0] NOC_CMD_data,
  input  logic                NOC_CMD_Flag,
  output logic                GPP_CMD_ACK
);

  logic [DATA_W-1:0]   bit_0, bit_1, bit_2, bit_3;
  logic                acc_cmd_valid, acc_cmd_ready;
  logic [STATUS_W-1:0] status_bit;
  logic                acc_status_valid, acc_status_ready;

  axil_writer #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_writer (
    .clk          (clk),
    .rstn         (rstn),
    .S_AXI_AWADDR (S_AXI_AWADDR),
    .S_AXI_AWVALID(S_AXI_AWVALID),
    .S_AXI_AWREADY(S_AXI_AWREADY),
    .S_AXI_WDATA  (S_AXI_WDATA),
    .S_AXI_WVALID (S_AXI_WVALID),
    .S_AXI_WREADY (S_AXI_WREADY),
    .S_AXI_BVALID (S_AXI_BVALID),
    .S_AXI_BRESP  (S_AXI_BRESP),
    .S_AXI_BREADY (S_AXI_BREADY),
    .bit_0        (bit_0),
    .bit_1        (bit_1),
    .bit_2        (bit_2),
    .bit_3        (bit_3),
    .Acc_cmd_valid(acc_cmd_valid),
    .Acc_cmd_ready(acc_cmd_ready)
  );

  axil_reader #(.ADDR_W(ADDR_W), .DATA_W(DATA_W), .STATUS_W(STATUS_W)) u_reader (
    .clk             (clk),
    .rstn            (rstn),
    .S_AXI_ARADDR    (S_AXI_ARADDR),
    .S_AXI_ARVALID   (S_AXI_ARVALID),
    .S_AXI_ARREADY   (S_AXI_ARREADY),
    .S_AXI_RVALID    (S_AXI_RVALID),
    .S_AXI_RREADY    (S_AXI_RREADY),
    .S_AXI_RDATA     (S_AXI_RDATA),
    .S_AXI_RRESP     (S_AXI_RRESP),
    .bit_0           (bit_0),
    .bit_1           (bit_1),
    .bit_2           (bit_2),
    .bit_3           (bit_3),
    .status_bit      (status_bit),
    .Acc_status_valid(acc_status_valid),
    .Acc_status_ready(acc_status_ready)
  );

  noc_interface #(.DATA_W(DATA_W), .CMD_W(CMD_W), .STATUS_W(STATUS_W)) u_noc_if (
    .clk             (clk),
    .rstn            (rstn),
    .bit_0           (bit_0),
    .bit_1           (bit_1),
    .bit_2           (bit_2),
    .bit_3           (bit_3),
    .Acc_cmd_valid   (acc_cmd_valid),
    .Acc_cmd_ready   (acc_cmd_ready),
    .status_bit      (status_bit),
    .Acc_status_valid(acc_status_valid),
    .Acc_status_ready(acc_status_ready),
    .GPP_CMD_data    (GPP_CMD_data),
    .GPP_CMD_Flag    (GPP_CMD_Flag),
    .NOC_CMD_ACK     (NOC_CMD_ACK),
    .NOC_CMD_data    (NOC_CMD_data),
    .NOC_CMD_Flag    (NOC_CMD_Flag),
    .GPP_CMD_ACK     (GPP_CMD_ACK)
  );

endmodule
