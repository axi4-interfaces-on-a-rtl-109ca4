// tb_axil_addr_decoder: self-checking test of the register-map decoder.
//
// Applies the five register addresses, their neighbours (off by one byte,
// one word and in the upper address bits) and random addresses, and
// compares enable/idx/hit with a reference written as a lookup of the
// register map {0x60, 0x64, 0x68, 0x6c, 0x70}.
module tb_axil_addr_decoder;
  import axil_pkg::*;

  logic [31:0]  addr;
  logic [4:0]   enable;
  reg_idx_e     idx;
  logic         hit;
  int checks = 0, failures = 0;
  int hits = 0;

  axil_addr_decoder dut (.addr(addr), .enable(enable), .idx(idx), .hit(hit));

  localparam logic [31:0] MAP [5] = '{32'h60, 32'h64, 32'h68, 32'h6c, 32'h70};

  task automatic apply(input logic [31:0] a);
    logic [4:0] exp_en;
    int         exp_i;
    exp_en = '0;
    exp_i  = 7;
    for (int k = 0; k < 5; k++) if (a == MAP[k]) begin exp_en[k] = 1'b1; exp_i = k; end
    addr = a;
    #1;
    checks++;
    if (enable !== exp_en || int'(idx) != exp_i || hit !== (exp_en != 0)) begin
      failures++;
      $display("FAIL addr=%h enable=%b idx=%0d hit=%b (expected %b %0d)", a, enable, idx, hit, exp_en, exp_i);
    end
    if (hit) hits++;
  endtask

  initial begin
    for (int k = 0; k < 5; k++) begin
      apply(MAP[k]);
      apply(MAP[k] + 1);
      apply(MAP[k] - 1);
      apply(MAP[k] + 32'h0001_0000);
      apply(MAP[k] | 32'h8000_0000);
    end
    apply(32'h74);
    apply(32'h5c);
    apply(32'h0);
    for (int i = 0; i < 2000; i++) apply($urandom & 32'h0000_00ff);
    for (int i = 0; i < 2000; i++) apply($urandom);
    checks++;
    if (hits < 5) begin failures++; $display("FAIL too few hits"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
