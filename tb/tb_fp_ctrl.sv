// Test of the slot controller: the phase counter must cycle 0..S-1; a start request
// produces J slots with feed_valid and feed_j = 0..J-1 starting at the next slot; a
// request made during a run starts the next run in the slot right after the last input
// (no gap); with no request the feeder goes idle and busy falls.
module tb_fp_ctrl;
  localparam int unsigned M = fuzzy_pkg::M_DEF;
  localparam int unsigned N = fuzzy_pkg::N_DEF;
  localparam int unsigned J = fuzzy_pkg::J_DEF;
  localparam int unsigned S = fuzzy_pkg::slot_len(M, N);
  localparam int unsigned JW = $clog2(J);
  localparam int unsigned PW = $clog2(S);

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [PW-1:0] ph;
  logic feed_valid, busy;
  logic [JW-1:0] feed_j;

  fp_ctrl dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_queued = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // model, evaluated once per clock after the edge
  int unsigned m_ph = 0, m_j = 0;
  bit m_feed = 0, m_pend = 0;

  always @(negedge clk) if (rst_n) begin
    check(ph == PW'(m_ph), $sformatf("ph %0d expected %0d", ph, m_ph));
    check(feed_valid == m_feed, $sformatf("feed_valid %0b expected %0b", feed_valid, m_feed));
    if (m_feed) check(feed_j == JW'(m_j), $sformatf("feed_j %0d expected %0d", feed_j, m_j));
    check(busy == (m_feed || m_pend), "busy");
  end

  always @(posedge clk) if (rst_n) begin
    bit req;
    req = m_pend || start;
    if (m_ph == S - 1) begin
      if (m_feed && m_j != J - 1) begin
        m_j++;
        m_pend = m_pend || start;
      end else begin
        if (m_feed && req) n_queued++;
        m_feed = req;
        m_j = 0;
        m_pend = 0;
      end
      m_ph = 0;
    end else begin
      if (start) m_pend = 1;
      m_ph++;
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      start = ($urandom_range(0, 59) == 0);
    end
    start = 1'b0;
    repeat (3 * J * S) @(negedge clk);
    check(!busy, "busy after all runs");
    $display("runs chained without a gap: %0d", n_queued);
    check(n_queued > 0, "no chained run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
