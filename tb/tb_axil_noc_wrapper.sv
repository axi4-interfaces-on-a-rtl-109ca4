// tb_axil_noc_wrapper: end-to-end test of the AXI4-Lite control slave.
//
// The wrapper runs with its default parameters (32-bit AXI, 128-bit
// command, 8-bit status). A host model issues commands as four AXI4-Lite
// writes (0x60/0x64/0x68 in random order, 0x6c last) mixed with writes and
// reads to unmapped addresses, while it polls the status register 0x70 on
// the read channel at the same time. A NoC model acknowledges packets
// after random delays and sends nonzero status bytes with random gaps.
// Checked: every 128-bit packet equals the words written, in order
// ({0x6c, 0x68, 0x64, 0x60} from MSB to LSB); every status byte the NoC
// sent is read back at 0x70 once, in order, zero-extended (0 means none
// pending); read-back of 0x60..0x6c returns the last words written; all
// responses are OKAY. A full-rate phase checks one write per clock, hence a
// 128-bit packet every four clocks. Each mechanism of the design is counted
// and must occur at least once: skid-buffer stalls, AW-before-W and
// W-before-AW, NoC command back-pressure, status back-pressure, reads and
// writes completing in the same clock, unmapped accesses, status reads with
// and without a pending byte.
module tb_axil_noc_wrapper;
  import axil_pkg::*;
  localparam int NCMD = 200;
  localparam int NSTAT = 150;

  logic clk = 1'b0, rstn = 1'b0;
  always #5 clk = ~clk;

  axil_if bus (.clk(clk), .rstn(rstn));
  logic [127:0] gpp_cmd_data;
  logic gpp_cmd_flag, noc_cmd_ack;
  logic [7:0] noc_cmd_data;
  logic noc_cmd_flag, gpp_cmd_ack;

  axil_noc_wrapper dut (
    .clk(clk), .rstn(rstn),
    .S_AXI_AWADDR(bus.awaddr), .S_AXI_AWVALID(bus.awvalid), .S_AXI_AWREADY(bus.awready),
    .S_AXI_WDATA(bus.wdata), .S_AXI_WVALID(bus.wvalid), .S_AXI_WREADY(bus.wready),
    .S_AXI_BVALID(bus.bvalid), .S_AXI_BRESP(bus.bresp), .S_AXI_BREADY(bus.bready),
    .S_AXI_ARADDR(bus.araddr), .S_AXI_ARVALID(bus.arvalid), .S_AXI_ARREADY(bus.arready),
    .S_AXI_RVALID(bus.rvalid), .S_AXI_RREADY(bus.rready), .S_AXI_RDATA(bus.rdata), .S_AXI_RRESP(bus.rresp),
    .GPP_CMD_data(gpp_cmd_data), .GPP_CMD_Flag(gpp_cmd_flag), .NOC_CMD_ACK(noc_cmd_ack),
    .NOC_CMD_data(noc_cmd_data), .NOC_CMD_Flag(noc_cmd_flag), .GPP_CMD_ACK(gpp_cmd_ack)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------- reference model and stimulus lists ----------------
  logic [31:0]  aw_list[$], w_list[$], ar_list[$];
  logic [127:0] exp_pkt[$];
  logic [31:0]  ref_regs[4] = '{default: '0};
  logic [7:0]   exp_stat[$];
  logic [31:0]  exp_rd[$];   // expected data of non-status reads, in order
  logic         rd_is_stat[$];

  task automatic add_write(input logic [31:0] a, input logic [31:0] d);
    aw_list.push_back(a);
    w_list.push_back(d);
    case (a)
      32'h60: ref_regs[0] = d;
      32'h64: ref_regs[1] = d;
      32'h68: ref_regs[2] = d;
      32'h6c: begin
        ref_regs[3] = d;
        exp_pkt.push_back({ref_regs[3], ref_regs[2], ref_regs[1], ref_regs[0]});
      end
      default: ;
    endcase
  endtask

  task automatic add_read(input logic [31:0] a, input logic [31:0] expd, input bit is_stat);
    ar_list.push_back(a);
    exp_rd.push_back(expd);
    rd_is_stat.push_back(is_stat);
  endtask

  // ---------------- event counters ----------------
  int n_aw = 0, n_w = 0, n_b = 0, n_r = 0, n_pkt = 0, n_stat_got = 0, n_stat_sent = 0;
  int c_aw_stall = 0, c_w_stall = 0, c_aw_first = 0, c_w_first = 0;
  int c_noc_backpressure = 0, c_stat_backpressure = 0, c_rw_same_clock = 0;
  int c_bad_write = 0, c_bad_read = 0, c_stat_hit = 0, c_stat_empty = 0;
  logic [127:0] prev_pkt = '0;
  logic         prev_wait = 1'b0;

  always @(posedge clk) if (rstn) begin
    logic aw_hs, w_hs;
    aw_hs = bus.awvalid && bus.awready;
    w_hs  = bus.wvalid && bus.wready;
    if (bus.awvalid && !bus.awready) c_aw_stall++;
    if (bus.wvalid && !bus.wready) c_w_stall++;
    if (aw_hs && !w_hs && n_aw >= n_w) c_aw_first++;
    if (w_hs && !aw_hs && n_w >= n_aw) c_w_first++;
    if (aw_hs) begin
      n_aw++;
      if (!(bus.awaddr inside {32'h60, 32'h64, 32'h68, 32'h6c})) c_bad_write++;
    end
    if (w_hs) n_w++;
    if (bus.bvalid && bus.bready) begin
      n_b++;
      check(bus.bresp == 2'b00, "BRESP OKAY");
      check(n_b <= n_aw && n_b <= n_w, "B after both beats");
    end
    if (bus.arvalid && bus.arready && !(bus.araddr inside {32'h60, 32'h64, 32'h68, 32'h6c, 32'h70}))
      c_bad_read++;
    if (bus.rvalid && bus.rready) begin
      n_r++;
      check(bus.rresp == 2'b00, "RRESP OKAY");
      if (exp_rd.size() == 0) check(1'b0, "unexpected read data");
      else if (rd_is_stat.pop_front()) begin
        void'(exp_rd.pop_front());
        check(bus.rdata[31:8] == '0, "status zero-extended");
        if (bus.rdata == 0) c_stat_empty++;
        else begin
          c_stat_hit++;
          if (exp_stat.size() == 0) check(1'b0, "status read without status sent");
          else check(bus.rdata[7:0] == exp_stat.pop_front(), "status byte order");
          n_stat_got++;
        end
      end else check(bus.rdata == exp_rd.pop_front(), "read data");
      if (bus.bvalid && bus.bready) c_rw_same_clock++;
    end
    // NoC command side
    if (prev_wait) check(gpp_cmd_flag && gpp_cmd_data == prev_pkt, "packet held until NOC_CMD_ACK");
    if (gpp_cmd_flag && !noc_cmd_ack) c_noc_backpressure++;
    if (gpp_cmd_flag && noc_cmd_ack) begin
      n_pkt++;
      if (exp_pkt.size() == 0) check(1'b0, "unexpected packet");
      else check(gpp_cmd_data == exp_pkt.pop_front(), "128-bit packet");
    end
    prev_wait = gpp_cmd_flag && !noc_cmd_ack;
    prev_pkt  = gpp_cmd_data;
    // NoC status side
    if (noc_cmd_flag && !gpp_cmd_ack) c_stat_backpressure++;
    if (noc_cmd_flag && gpp_cmd_ack) begin
      exp_stat.push_back(noc_cmd_data);
      n_stat_sent++;
    end
  end

  // ---------------- NoC model ----------------
  logic noc_run = 1'b1;
  logic noc_fast = 1'b0;
  int   stat_left = NSTAT;
  logic stat_taken = 1'b0;
  always @(posedge clk) stat_taken <= noc_cmd_flag && gpp_cmd_ack;

  initial begin
    noc_cmd_ack = 1'b0; noc_cmd_flag = 1'b0; noc_cmd_data = '0;
    forever begin
      @(negedge clk);
      noc_cmd_ack = noc_fast || ($urandom_range(0, 3) == 0);
      if (!noc_cmd_flag || stat_taken) begin
        if (stat_left > 0 && noc_run && $urandom_range(0, 5) == 0) begin
          noc_cmd_flag = 1'b1;
          noc_cmd_data = 8'($urandom_range(1, 255));
          stat_left--;
        end else noc_cmd_flag = 1'b0;
      end
    end
  end

  // ---------------- host ----------------
  initial begin
    int order[3];
    logic [31:0] bad;
    bus.init_master();
    repeat (4) @(negedge clk);
    rstn = 1'b1;

    // phase 1: commands on the write channels, status polling on the read channel
    for (int c = 0; c < NCMD; c++) begin
      order = '{0, 1, 2};
      order.shuffle();
      foreach (order[k]) begin
        add_write(32'h60 + 32'(order[k]) * 4, $urandom);
        if ($urandom_range(0, 7) == 0) begin
          bad = 32'($urandom_range(0, 255));
          if (bad inside {32'h60, 32'h64, 32'h68, 32'h6c, 32'h70}) bad = 32'h0;
          add_write(bad, $urandom);
        end
      end
      add_write(32'h6c, $urandom);
    end
    for (int i = 0; i < 4 * NCMD; i++) begin
      if ($urandom_range(0, 9) == 0) add_read(32'h0000_1070, 32'h0, 1'b0);
      else add_read(32'h70, 32'h0, 1'b1);
    end
    fork
      foreach (aw_list[i]) bus.send_aw(aw_list[i], $urandom_range(0, 2));
      foreach (w_list[i])  bus.send_w(w_list[i], $urandom_range(0, 2));
      foreach (ar_list[i]) bus.send_ar(ar_list[i], $urandom_range(0, 3));
      while (n_b < aw_list.size() || n_r < ar_list.size()) begin
        @(negedge clk);
        bus.bready = ($urandom_range(0, 4) != 0);
        bus.rready = ($urandom_range(0, 4) != 0);
      end
    join
    bus.bready = 1'b1;
    bus.rready = 1'b1;
    noc_fast = 1'b1;
    repeat (10) @(negedge clk);
    check(n_pkt == NCMD && exp_pkt.size() == 0, "every command reached the NoC");
    check(n_b == aw_list.size(), "every write answered");

    // phase 2: drain remaining status bytes, then poll once more with none pending
    noc_run = 1'b1;
    while (stat_left > 0 || noc_cmd_flag) @(negedge clk);
    repeat (3) @(negedge clk);
    while (exp_stat.size() > 0) begin
      add_read(32'h70, 32'h0, 1'b1);
      bus.send_ar(32'h70, 0);
      repeat (2) @(negedge clk);
    end
    add_read(32'h70, 32'h0, 1'b1);
    bus.send_ar(32'h70, 0);
    repeat (3) @(negedge clk);
    check(n_stat_got == NSTAT && n_stat_sent == NSTAT, "every status byte read once");

    // phase 3: read back the command words
    add_read(32'h60, ref_regs[0], 1'b0);
    add_read(32'h64, ref_regs[1], 1'b0);
    add_read(32'h68, ref_regs[2], 1'b0);
    add_read(32'h6c, ref_regs[3], 1'b0);
    for (int k = 0; k < 4; k++) bus.send_ar(32'h60 + 32'(k) * 4, 0);
    repeat (3) @(negedge clk);
    check(n_r == ar_list.size() && exp_rd.size() == 0, "read-back answered");

    // phase 4: full rate, 8 commands = 32 writes in 32 clocks, a packet every 4 clocks
    begin
      int p0, t_first, t_last, cyc;
      p0 = n_pkt; t_first = -1; t_last = -1; cyc = 0;
      aw_list.delete(); w_list.delete();
      for (int c = 0; c < 8; c++)
        for (int k = 0; k < 4; k++) add_write(32'h60 + 32'(k) * 4, {8'(c), 24'(k)});
      fork
        foreach (aw_list[i]) bus.send_aw(aw_list[i], 0);
        foreach (w_list[i])  bus.send_w(w_list[i], 0);
        while (n_pkt < p0 + 8) begin
          @(posedge clk);
          cyc++;
          if (gpp_cmd_flag && noc_cmd_ack) begin
            if (t_first < 0) t_first = cyc;
            t_last = cyc;
          end
        end
      join
      check(t_last - t_first == 28, "8 packets, one every 4 clocks");
      check(exp_pkt.size() == 0, "full-rate packets all seen");
      $display("full rate: first packet at %0d, last at %0d", t_first, t_last);
    end

    // every mechanism must have happened
    check(c_aw_stall > 0,          "AW skid-buffer stall");
    check(c_w_stall > 0,           "W skid-buffer stall");
    check(c_aw_first > 0,          "address before data");
    check(c_w_first > 0,           "data before address");
    check(c_noc_backpressure > 0,  "NoC command back-pressure");
    check(c_stat_backpressure > 0, "status back-pressure");
    check(c_rw_same_clock > 0,     "read and write in the same clock");
    check(c_bad_write > 0,         "unmapped write");
    check(c_bad_read > 0,          "unmapped read");
    check(c_stat_hit > 0,          "status read with a byte pending");
    check(c_stat_empty > 0,        "status read with none pending");
    $display("aw_stall=%0d w_stall=%0d aw_first=%0d w_first=%0d noc_bp=%0d stat_bp=%0d rw_same=%0d",
             c_aw_stall, c_w_stall, c_aw_first, c_w_first, c_noc_backpressure, c_stat_backpressure, c_rw_same_clock);
    $display("bad_w=%0d bad_r=%0d stat_hit=%0d stat_empty=%0d packets=%0d",
             c_bad_write, c_bad_read, c_stat_hit, c_stat_empty, n_pkt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
