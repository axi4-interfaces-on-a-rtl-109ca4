// tb_noc_interface: self-checking test of the NoC hand-over block.
//
// Command side: a writer model presents random 4x32-bit commands with
// Acc_cmd_valid (held until Acc_cmd_ready); a NoC model acknowledges with
// random delays. Each packet seen with GPP_CMD_Flag && NOC_CMD_ACK must equal
// {bit_3, bit_2, bit_1, bit_0} of the next expected command, and flag and
// data must not change while unacknowledged. With NOC_CMD_ACK held high,
// commands must pass one per clock. Status side: random bytes offered by the
// NoC with NOC_CMD_Flag must reach status_bit/Acc_status_valid in order and
// be released by Acc_status_ready.
module tb_noc_interface;
  localparam int N = 500;

  logic clk = 1'b0, rstn = 1'b0;
  logic [31:0] bit_0, bit_1, bit_2, bit_3;
  logic acc_cmd_valid, acc_cmd_ready;
  logic [7:0] status_bit;
  logic acc_status_valid, acc_status_ready;
  logic [127:0] gpp_cmd_data;
  logic gpp_cmd_flag, noc_cmd_ack;
  logic [7:0] noc_cmd_data;
  logic noc_cmd_flag, gpp_cmd_ack;
  int checks = 0, failures = 0;
  int ack_waits = 0, cmd_done = 0, stat_done = 0;

  always #5 clk = ~clk;

  noc_interface dut (
    .clk(clk), .rstn(rstn),
    .bit_0(bit_0), .bit_1(bit_1), .bit_2(bit_2), .bit_3(bit_3),
    .Acc_cmd_valid(acc_cmd_valid), .Acc_cmd_ready(acc_cmd_ready),
    .status_bit(status_bit), .Acc_status_valid(acc_status_valid), .Acc_status_ready(acc_status_ready),
    .GPP_CMD_data(gpp_cmd_data), .GPP_CMD_Flag(gpp_cmd_flag), .NOC_CMD_ACK(noc_cmd_ack),
    .NOC_CMD_data(noc_cmd_data), .NOC_CMD_Flag(noc_cmd_flag), .GPP_CMD_ACK(gpp_cmd_ack)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  logic [127:0] cmd_q[$];
  logic [7:0]   stat_q[$];
  logic         cmd_acc = 1'b0, stat_acc = 1'b0;
  logic         prev_wait = 1'b0;
  logic [127:0] prev_pkt = '0;

  always @(posedge clk) begin
    cmd_acc = 1'b0;
    stat_acc = 1'b0;
    if (rstn) begin
      if (acc_cmd_valid && acc_cmd_ready) begin
        cmd_q.push_back({bit_3, bit_2, bit_1, bit_0});
        cmd_acc = 1'b1;
      end
      if (prev_wait) check(gpp_cmd_flag && gpp_cmd_data == prev_pkt, "packet held until ack");
      if (gpp_cmd_flag && noc_cmd_ack) begin
        if (cmd_q.size() == 0) check(1'b0, "packet without command");
        else check(gpp_cmd_data == cmd_q.pop_front(), "packet = {bit_3,bit_2,bit_1,bit_0}");
        cmd_done++;
      end
      if (gpp_cmd_flag && !noc_cmd_ack) ack_waits++;
      prev_wait = gpp_cmd_flag && !noc_cmd_ack;
      prev_pkt  = gpp_cmd_data;
      if (noc_cmd_flag && gpp_cmd_ack) begin
        stat_q.push_back(noc_cmd_data);
        stat_acc = 1'b1;
      end
      if (acc_status_valid && acc_status_ready) begin
        if (stat_q.size() == 0) check(1'b0, "status without input");
        else check(status_bit == stat_q.pop_front(), "status byte");
        stat_done++;
      end
    end
  end

  int sent = 0, ssent = 0;
  initial begin
    int got0;
    acc_cmd_valid = 0; noc_cmd_ack = 0; noc_cmd_flag = 0; acc_status_ready = 0;
    bit_0 = 0; bit_1 = 0; bit_2 = 0; bit_3 = 0; noc_cmd_data = 0;
    repeat (3) @(negedge clk);
    rstn = 1'b1;
    @(negedge clk);
    check(!gpp_cmd_flag && !acc_status_valid && acc_cmd_ready && gpp_cmd_ack, "idle after reset");
    while (sent < N || ssent < N || (acc_cmd_valid && !cmd_acc) || (noc_cmd_flag && !stat_acc)) begin
      @(negedge clk);
      if (!acc_cmd_valid || cmd_acc) begin
        if (sent < N && $urandom_range(0, 2) != 0) begin
          acc_cmd_valid = 1'b1;
          bit_0 = $urandom; bit_1 = $urandom; bit_2 = $urandom; bit_3 = $urandom;
          sent++;
        end else acc_cmd_valid = 1'b0;
      end
      if (!noc_cmd_flag || stat_acc) begin
        if (ssent < N && $urandom_range(0, 1) != 0) begin
          noc_cmd_flag = 1'b1; noc_cmd_data = 8'($urandom); ssent++;
        end else noc_cmd_flag = 1'b0;
      end
      noc_cmd_ack      = ($urandom_range(0, 2) == 0);
      acc_status_ready = ($urandom_range(0, 1) == 0);
    end
    @(negedge clk);
    acc_cmd_valid = 0; noc_cmd_flag = 0;
    noc_cmd_ack = 1; acc_status_ready = 1;
    repeat (4) @(negedge clk);
    check(cmd_done == N, "all commands delivered");
    check(stat_done == N, "all status bytes delivered");
    check(ack_waits > 0, "NoC back-pressure happened");
    // full rate: a new packet every clock while the NoC acknowledges at once
    got0 = cmd_done;
    for (int i = 0; i < 50; i++) begin
      acc_cmd_valid = 1'b1;
      bit_0 = i; bit_1 = ~i; bit_2 = i * 3; bit_3 = 32'hC0DE_0000 + i;
      @(negedge clk);
      check(cmd_acc, "command accepted every clock");
    end
    acc_cmd_valid = 1'b0;
    repeat (2) @(negedge clk);
    check(cmd_done - got0 == 50, "50 packets in 50 clocks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N * 40) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
