// axil_pkg: constants and types shared by the AXI4-Lite command slave.
//
// The slave is a 32-bit AXI4-Lite port that lets a host processor hand
// 128-bit commands to an accelerator network-on-chip (NoC) and read back an
// 8-bit status byte. This package fixes the register map and widths:
//   0x60 word 0 -> command bits [31:0]
//   0x64 word 1 -> command bits [63:32]
//   0x68 word 2 -> command bits [95:64]
//   0x6c word 3 -> command bits [127:96]; writing it completes the command
//   0x70 status byte from the NoC (read only), zero-extended to 32 bits
// Addresses, widths and the always-OKAY responses follow the design
// description; the enumeration of register indices is this design's own.
package axil_pkg;

  localparam int unsigned AXI_ADDR_W = 32;
  localparam int unsigned AXI_DATA_W = 32;
  localparam int unsigned CMD_WORDS  = 4;
  localparam int unsigned PKT_W      = CMD_WORDS * AXI_DATA_W;  // 128
  localparam int unsigned STAT_W     = 8;
  localparam int unsigned N_REGS     = CMD_WORDS + 1;           // 4 command words + status

  localparam logic [AXI_ADDR_W-1:0] ADDR_CMD0   = 32'h0000_0060;
  localparam logic [AXI_ADDR_W-1:0] ADDR_CMD1   = 32'h0000_0064;
  localparam logic [AXI_ADDR_W-1:0] ADDR_CMD2   = 32'h0000_0068;
  localparam logic [AXI_ADDR_W-1:0] ADDR_CMD3   = 32'h0000_006C;
  localparam logic [AXI_ADDR_W-1:0] ADDR_STATUS = 32'h0000_0070;

  // AXI response code: the slave always answers OKAY.
  typedef enum logic [1:0] {
    RESP_OKAY   = 2'b00,
    RESP_EXOKAY = 2'b01,
    RESP_SLVERR = 2'b10,
    RESP_DECERR = 2'b11
  } axi_resp_e;

  // Index of a decoded register; REG_NONE marks an address outside the map.
  typedef enum logic [2:0] {
    REG_CMD0   = 3'd0,
    REG_CMD1   = 3'd1,
    REG_CMD2   = 3'd2,
    REG_CMD3   = 3'd3,
    REG_STATUS = 3'd4,
    REG_NONE   = 3'd7
  } reg_idx_e;

  // The four command words as they are packed towards the NoC:
  // word[0] (0x60) lands in bits [31:0], word[3] (0x6c) in bits [127:96].
  typedef logic [CMD_WORDS-1:0][AXI_DATA_W-1:0] cmd_words_t;

endpackage
