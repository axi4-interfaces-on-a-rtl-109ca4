// tb_axil_reader: self-checking test of the AXI4-Lite reader.
//
// Four fixed random command words sit on bit_0..bit_3 and a status source
// always offers the next byte of a numbered sequence on
// status_bit/Acc_status_valid. Random reads of 0x60..0x70 and of addresses
// outside the map are issued with random gaps under random RREADY
// back-pressure. Every R beat is compared in order with the expected value:
// the command word, the next status byte zero-extended to 32 bits, or 0 for
// an unmapped address; RRESP must be OKAY. Each 0x70 read must consume
// exactly one status byte. Then a read of 0x70 with no status pending must
// return 0 and consume nothing, and 16 back-to-back reads with RREADY high
// must complete in 16 consecutive clocks.
module tb_axil_reader;
  import axil_pkg::*;
  localparam int N = 1500;

  logic clk = 1'b0, rstn = 1'b0;
  always #5 clk = ~clk;

  axil_if bus (.clk(clk), .rstn(rstn));
  logic [31:0] bit_0, bit_1, bit_2, bit_3;
  logic [7:0]  status_bit;
  logic        acc_status_valid, acc_status_ready;

  axil_reader dut (
    .clk(clk), .rstn(rstn),
    .S_AXI_ARADDR(bus.araddr), .S_AXI_ARVALID(bus.arvalid), .S_AXI_ARREADY(bus.arready),
    .S_AXI_RVALID(bus.rvalid), .S_AXI_RREADY(bus.rready), .S_AXI_RDATA(bus.rdata), .S_AXI_RRESP(bus.rresp),
    .bit_0(bit_0), .bit_1(bit_1), .bit_2(bit_2), .bit_3(bit_3),
    .status_bit(status_bit), .Acc_status_valid(acc_status_valid), .Acc_status_ready(acc_status_ready)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  logic [31:0] ar_list[$];
  logic [31:0] exp_r[$];
  int n_r = 0, n_pop = 0, n_stat_reads = 0, n_bad = 0, r_stalls = 0;
  logic [7:0] next_status = 8'd1;

  // status source: a new byte right after each consumption
  always @(posedge clk) if (rstn) begin
    if (acc_status_valid && acc_status_ready) begin
      n_pop++;
      next_status <= next_status + 8'd1;
    end
    if (bus.rvalid && !bus.rready) r_stalls++;
    if (bus.rvalid && bus.rready) begin
      n_r++;
      check(bus.rresp == 2'b00, "RRESP is OKAY");
      if (exp_r.size() == 0) check(1'b0, "unexpected read data");
      else check(bus.rdata == exp_r.pop_front(), "read data");
    end
  end
  assign status_bit = next_status;

  initial begin
    logic [7:0] stat;
    logic [31:0] a;
    bus.init_master();
    acc_status_valid = 1'b1;
    bit_0 = $urandom; bit_1 = $urandom; bit_2 = $urandom; bit_3 = $urandom;
    repeat (3) @(negedge clk);
    rstn = 1'b1;
    stat = 8'd1;
    for (int i = 0; i < N; i++) begin
      case ($urandom_range(0, 5))
        0: begin a = 32'h60; exp_r.push_back(bit_0); end
        1: begin a = 32'h64; exp_r.push_back(bit_1); end
        2: begin a = 32'h68; exp_r.push_back(bit_2); end
        3: begin a = 32'h6c; exp_r.push_back(bit_3); end
        4: begin a = 32'h70; exp_r.push_back({24'h0, stat}); stat++; n_stat_reads++; end
        default: begin
          a = $urandom_range(0, 1) ? 32'($urandom_range(0, 255)) : $urandom;
          if (a inside {32'h60, 32'h64, 32'h68, 32'h6c, 32'h70}) a = 32'h5c;
          exp_r.push_back('0);
          n_bad++;
        end
      endcase
      ar_list.push_back(a);
    end
    fork
      foreach (ar_list[i]) bus.send_ar(ar_list[i], $urandom_range(0, 2));
      while (n_r < N) begin
        @(negedge clk);
        bus.rready = ($urandom_range(0, 2) != 0);
      end
    join
    bus.rready = 1'b1;
    repeat (3) @(negedge clk);
    check(n_r == N && exp_r.size() == 0, "every read answered");
    check(n_pop == n_stat_reads, "one status byte per 0x70 read");
    check(n_bad > 0 && r_stalls > 0 && n_stat_reads > 0, "invalid reads, R stalls and status reads happened");
    $display("reads=%0d status=%0d invalid=%0d r_stalls=%0d", n_r, n_stat_reads, n_bad, r_stalls);

    // no status pending: 0x70 returns 0 and consumes nothing
    acc_status_valid = 1'b0;
    exp_r.push_back('0);
    bus.send_ar(32'h70, 0);
    repeat (3) @(negedge clk);
    check(n_r == N + 1 && exp_r.size() == 0, "empty status read answered with 0");
    check(n_pop == n_stat_reads, "empty status read consumed nothing");
    acc_status_valid = 1'b1;

    // full rate
    begin
      int r0, t_first, t_last, cyc;
      r0 = n_r; t_first = -1; t_last = -1; cyc = 0;
      for (int i = 0; i < 16; i++) exp_r.push_back((i % 2) ? bit_1 : bit_2);
      fork
        for (int i = 0; i < 16; i++) bus.send_ar((i % 2) ? 32'h64 : 32'h68, 0);
        while (n_r < r0 + 16) begin
          @(posedge clk);
          cyc++;
          if (bus.rvalid && bus.rready) begin
            if (t_first < 0) t_first = cyc;
            t_last = cyc;
          end
        end
      join
      check(t_last - t_first == 15, "16 reads in 16 consecutive clocks");
      $display("full rate: first R at %0d, last at %0d", t_first, t_last);
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
