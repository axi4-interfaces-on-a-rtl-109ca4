// tb_axil_writer: self-checking test of the AXI4-Lite writer.
//
// Commands are written as four words, the 0x64/0x60/0x68 words in random
// order and 0x6c last, mixed with writes to addresses outside the map. The
// address and data beats travel on independent threads with random gaps,
// so both AW-before-W and W-before-AW orders occur; BREADY and
// Acc_cmd_ready apply random back-pressure. A reference model of the four
// registers, advanced in write order, predicts every command; each
// Acc_cmd_valid && Acc_cmd_ready handshake must show that command on
// bit_0..bit_3. Every write must get exactly one OKAY response, never before
// both of its beats were accepted. A last phase checks one write per clock
// when nothing applies back-pressure.
module tb_axil_writer;
  import axil_pkg::*;
  localparam int NCMD = 150;

  logic clk = 1'b0, rstn = 1'b0;
  always #5 clk = ~clk;

  axil_if bus (.clk(clk), .rstn(rstn));
  logic [31:0] bit_0, bit_1, bit_2, bit_3;
  logic acc_cmd_valid, acc_cmd_ready;

  axil_writer dut (
    .clk(clk), .rstn(rstn),
    .S_AXI_AWADDR(bus.awaddr), .S_AXI_AWVALID(bus.awvalid), .S_AXI_AWREADY(bus.awready),
    .S_AXI_WDATA(bus.wdata), .S_AXI_WVALID(bus.wvalid), .S_AXI_WREADY(bus.wready),
    .S_AXI_BVALID(bus.bvalid), .S_AXI_BRESP(bus.bresp), .S_AXI_BREADY(bus.bready),
    .bit_0(bit_0), .bit_1(bit_1), .bit_2(bit_2), .bit_3(bit_3),
    .Acc_cmd_valid(acc_cmd_valid), .Acc_cmd_ready(acc_cmd_ready)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  logic [31:0]  aw_list[$], w_list[$];
  logic [127:0] exp_cmd[$];
  logic [31:0]  ref_regs[4] = '{default: '0};
  int n_aw = 0, n_w = 0, n_b = 0, n_cmd = 0, n_invalid = 0;
  int aw_first = 0, w_first = 0, cmd_stalls = 0;

  task automatic add_write(input logic [31:0] a, input logic [31:0] d);
    aw_list.push_back(a);
    w_list.push_back(d);
    case (a)
      32'h60: ref_regs[0] = d;
      32'h64: ref_regs[1] = d;
      32'h68: ref_regs[2] = d;
      32'h6c: begin
        ref_regs[3] = d;
        exp_cmd.push_back({ref_regs[3], ref_regs[2], ref_regs[1], ref_regs[0]});
      end
      default: n_invalid++;
    endcase
  endtask

  // monitors
  always @(posedge clk) if (rstn) begin
    // a beat that arrives while its partner on the other channel has not
    if (bus.awvalid && bus.awready && !(bus.wvalid && bus.wready) && n_aw >= n_w) aw_first++;
    if (bus.wvalid && bus.wready && !(bus.awvalid && bus.awready) && n_w >= n_aw) w_first++;
    if (bus.awvalid && bus.awready) n_aw++;
    if (bus.wvalid && bus.wready) n_w++;
    if (bus.bvalid && bus.bready) begin
      n_b++;
      check(bus.bresp == 2'b00, "BRESP is OKAY");
      check(n_b <= n_aw && n_b <= n_w, "response only after both beats");
    end
    if (acc_cmd_valid && !acc_cmd_ready) cmd_stalls++;
    if (acc_cmd_valid && acc_cmd_ready) begin
      n_cmd++;
      if (exp_cmd.size() == 0) check(1'b0, "unexpected command");
      else check({bit_3, bit_2, bit_1, bit_0} == exp_cmd.pop_front(), "command words");
    end
  end

  initial begin
    int order[3];
    logic [31:0] bad;
    logic [31:0] snap[4];
    bus.init_master();
    acc_cmd_ready = 1'b1;
    repeat (3) @(negedge clk);
    rstn = 1'b1;
    // build the stimulus
    for (int c = 0; c < NCMD; c++) begin
      order = '{0, 1, 2};
      order.shuffle();
      foreach (order[k]) begin
        add_write(32'h60 + 32'(order[k]) * 4, $urandom);
        if ($urandom_range(0, 5) == 0) begin
          bad = $urandom_range(0, 1) ? 32'($urandom_range(0, 255)) : $urandom;
          if (bad inside {32'h60, 32'h64, 32'h68, 32'h6c, 32'h70}) bad = 32'h74;
          add_write(bad, $urandom);
        end
      end
      add_write(32'h6c, $urandom);
    end
    fork
      foreach (aw_list[i]) bus.send_aw(aw_list[i], $urandom_range(0, 3));
      foreach (w_list[i])  bus.send_w(w_list[i], $urandom_range(0, 3));
      begin
        while (n_b < aw_list.size()) begin
          @(negedge clk);
          bus.bready = ($urandom_range(0, 3) != 0);
          acc_cmd_ready = ($urandom_range(0, 2) != 0);
        end
      end
    join
    bus.bready = 1'b1;
    acc_cmd_ready = 1'b1;
    repeat (5) @(negedge clk);
    check(n_b == aw_list.size(), "one response per write");
    check(n_cmd == NCMD, "one command per 0x6c write");
    check(exp_cmd.size() == 0, "all commands seen");
    check(n_invalid > 0 && aw_first > 0 && w_first > 0 && cmd_stalls > 0,
          "invalid writes, both beat orders and command stalls happened");
    $display("writes=%0d invalid=%0d aw_first=%0d w_first=%0d cmd_stalls=%0d",
             n_b, n_invalid, aw_first, w_first, cmd_stalls);

    // invalid writes alone change nothing and raise no command
    snap = '{bit_0, bit_1, bit_2, bit_3};
    fork
      begin bus.send_aw(32'h0000_0160, 0); bus.send_aw(32'h7c, 0); bus.send_aw(32'h70, 0); end
      begin bus.send_w(32'hDEAD_BEEF, 0); bus.send_w(32'hDEAD_BEEF, 0); bus.send_w(32'hDEAD_BEEF, 0); end
    join
    repeat (4) @(negedge clk);
    check(bit_0 == snap[0] && bit_1 == snap[1] && bit_2 == snap[2] && bit_3 == snap[3],
          "invalid addresses leave the registers alone");
    check(n_cmd == NCMD && !acc_cmd_valid, "invalid addresses raise no command");
    check(n_b == aw_list.size() + 3, "invalid writes still answered");

    // full rate: 16 writes with no back-pressure complete in 16 consecutive clocks
    begin
      int b0, t_first, t_last, cyc;
      b0 = n_b; t_first = -1; t_last = -1; cyc = 0;
      for (int i = 3; i < 16; i += 4)
        exp_cmd.push_back({32'h1000 + 32'(i), 32'h1000 + 32'(i - 1), 32'h1000 + 32'(i - 2), 32'h1000 + 32'(i - 3)});
      fork
        for (int i = 0; i < 16; i++) bus.send_aw(32'h60 + 32'(i % 4) * 4, 0);
        for (int i = 0; i < 16; i++) bus.send_w(32'h1000 + 32'(i), 0);
        while (n_b < b0 + 16) begin
          @(posedge clk);
          cyc++;
          if (bus.bvalid && bus.bready) begin
            if (t_first < 0) t_first = cyc;
            t_last = cyc;
          end
        end
      join
      check(t_last - t_first == 15, "16 responses in 16 consecutive clocks");
      repeat (3) @(negedge clk);
      check(bit_3 == 32'h100f && bit_0 == 32'h100c, "last full-rate words stored");
      check(n_cmd == NCMD + 4 && exp_cmd.size() == 0, "four full-rate commands");
      $display("full rate: first B at %0d, last at %0d", t_first, t_last);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
