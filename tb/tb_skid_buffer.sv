// tb_skid_buffer: self-checking test of the skid buffer.
//
// A producer offers a numbered word stream with random gaps (holding VALID
// until READY, as the AXI rules demand) and a consumer applies random READY
// back-pressure. A scoreboard checks that every word arrives once and in
// order, that M_valid/M_data hold while the consumer stalls, and that
// S_ready does not react to M_ready within a cycle (it is registered).
// Then, with VALID and READY held high, it checks one word per clock, and
// with READY low that the buffer parks the stalled word and deasserts
// S_ready.
module tb_skid_buffer;
  localparam int unsigned DW = 32;
  localparam int N = 2000;

  logic clk = 1'b0, rstn = 1'b0;
  logic [DW-1:0] s_data, m_data;
  logic s_valid, s_ready, m_valid, m_ready;
  int checks = 0, failures = 0;
  int stalls = 0, received = 0, sent = 0;

  always #5 clk = ~clk;

  skid_buffer dut (
    .clk(clk), .rstn(rstn),
    .S_data(s_data), .S_valid(s_valid), .S_ready(s_ready),
    .M_data(m_data), .M_valid(m_valid), .M_ready(m_ready)
  );

  logic [DW-1:0] exp_q[$];
  logic          prev_stall = 1'b0;
  logic [DW-1:0] prev_data = '0;
  logic          accepted = 1'b0;   // input handshake at the last rising edge

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // scoreboard on the rising edge (pre-edge values)
  always @(posedge clk) begin
    accepted = 1'b0;
    if (rstn) begin
      if (s_valid && s_ready) begin
        exp_q.push_back(s_data);
        accepted = 1'b1;
      end
      if (prev_stall) check(m_valid && m_data == prev_data, "output held during stall");
      if (m_valid && m_ready) begin
        if (exp_q.size() == 0) check(1'b0, "output without input");
        else check(m_data == exp_q.pop_front(), "data order");
        received++;
      end
      if (m_valid && !m_ready) stalls++;
      prev_stall = m_valid && !m_ready;
      prev_data  = m_data;
    end
  end

  initial begin
    logic rdy_before;
    int got0;
    s_valid = 0; s_data = '0; m_ready = 0;
    repeat (3) @(negedge clk);
    rstn = 1'b1;
    // random phase: producer and consumer in one loop, both act on the falling edge
    while (sent < N || (s_valid && !accepted)) begin
      @(negedge clk);
      if (!s_valid || accepted) begin
        if (sent < N && $urandom_range(0, 3) != 0) begin
          s_valid = 1'b1; s_data = {$urandom} ^ DW'(sent); sent++;
        end else s_valid = 1'b0;
      end
      rdy_before = s_ready;
      m_ready = ($urandom_range(0, 2) != 0);
      #1 check(s_ready == rdy_before, "S_ready independent of M_ready");
    end
    @(negedge clk);
    s_valid = 1'b0;
    m_ready = 1'b1;
    repeat (5) @(negedge clk);
    check(received == N, "all words delivered");
    check(exp_q.size() == 0, "nothing left inside");
    check(stalls > 0, "stalls happened");
    $display("random phase: %0d words, %0d stall cycles", received, stalls);

    // full-rate phase: one word per clock
    got0 = received;
    for (int i = 0; i < 100; i++) begin
      s_valid = 1'b1; s_data = DW'(i * 7 + 1);
      @(negedge clk);
      check(accepted, "input accepted every cycle at full rate");
    end
    s_valid = 1'b0;
    @(negedge clk);
    check(received - got0 == 100, "100 words in 100 cycles");

    // stall phase: the stalled word is parked, S_ready drops, nothing is lost
    m_ready = 1'b0;
    s_valid = 1'b1; s_data = 32'hAAAA_0001;
    @(negedge clk);
    s_valid = 1'b0; s_data = 32'h5555_5555;
    check(!s_ready, "not ready with a parked word");
    check(m_valid && m_data == 32'hAAAA_0001, "parked word on output");
    repeat (3) @(negedge clk);
    check(!s_ready && m_valid && m_data == 32'hAAAA_0001, "still holding");
    m_ready = 1'b1;
    @(negedge clk);
    check(s_ready && !m_valid, "empty after drain");
    check(exp_q.size() == 0, "parked word delivered");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N * 20) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
