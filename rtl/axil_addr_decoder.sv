// axil_addr_decoder: register-map decoder of the AXI4-Lite command slave.
//
// Compares a 32-bit AXI address with the five register addresses of
// axil_pkg and returns a one-hot enable (enable[0] = 0x60 ... enable[3] =
// 0x6c, enable[4] = 0x70), the matching register index and a hit flag.
// Purely combinational. The write path uses enable[3:0] only, since 0x70 is
// read-only. The full 32-bit compare (no address aliasing) is this design's
// choice; any other address simply produces no enable.
module axil_addr_decoder
  import axil_pkg::*;
(
  input  logic [AXI_ADDR_W-1:0] addr,
  output logic [N_REGS-1:0]     enable,
  output reg_idx_e              idx,
  output logic                  hit
);

  always_comb begin
    enable = '0;
    idx    = REG_NONE;
    unique case (addr)
      ADDR_CMD0:   begin enable[0] = 1'b1; idx = REG_CMD0;   end
      ADDR_CMD1:   begin enable[1] = 1'b1; idx = REG_CMD1;   end
      ADDR_CMD2:   begin enable[2] = 1'b1; idx = REG_CMD2;   end
      ADDR_CMD3:   begin enable[3] = 1'b1; idx = REG_CMD3;   end
      ADDR_STATUS: begin enable[4] = 1'b1; idx = REG_STATUS; end
      default:     ;
    endcase
  end

  assign hit = |enable;

endmodule
