// Test of the weighted-average circuit.
//
// The testbench plays the score multiplexer (w_in = scores[sel]).  Random singleton
// positions and score sets, including single non-zero scores, all-maximum scores and an
// all-zero set, are checked against floor(sum w*S / sum w) (0 when sum w = 0), and done
// must rise K+N+2 edges after the edge that samples start.
module tb_fp_wac;
  localparam int unsigned N = fuzzy_pkg::N_DEF;
  localparam int unsigned K = fuzzy_pkg::K_DEF;
  localparam int unsigned KW = $clog2(K);
  localparam int unsigned F = (1 << N) - 1;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [KW-1:0] sel;
  logic [N-1:0] w_in;
  logic sing_we = 1'b0; logic [KW-1:0] sing_waddr = '0; logic [N-1:0] sing_wdata = '0;
  logic busy, done;
  logic [N-1:0] y;

  fp_wac dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_zero = 0;
  int unsigned sc [K], sg [K];
  assign w_in = N'(sc[sel]);

  task automatic run(input string tag);
    longint unsigned num = 0, den = 0;
    int unsigned e, n;
    for (int k = 0; k < K; k++) begin num += longint'(sc[k] * sg[k]); den += longint'(sc[k]); end
    e = (den == 0) ? 0 : int'(num / den);
    if (den == 0) n_zero++;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    n = 0;
    while (!done) begin @(negedge clk); n++; end
    checks++;
    if (y != N'(e) || n != K + N + 2) begin
      failures++;
      $display("FAIL %s: y=%0d expected %0d, %0d cycles", tag, y, e, n);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      if (t % 20 == 0) begin
        for (int k = 0; k < K; k++) begin
          sg[k] = $urandom_range(0, F);
          @(negedge clk);
          sing_we = 1'b1; sing_waddr = KW'(k); sing_wdata = N'(sg[k]);
        end
        @(negedge clk) sing_we = 1'b0;
      end
      for (int k = 0; k < K; k++) begin
        case (t % 4)
          0: sc[k] = $urandom_range(0, F);
          1: sc[k] = (k == t % K) ? $urandom_range(1, F) : 0;
          2: sc[k] = F;
          default: sc[k] = ($urandom_range(0, 1) == 1) ? $urandom_range(0, 20) : 0;
        endcase
      end
      if (t == 7) for (int k = 0; k < K; k++) sc[k] = 0;
      run($sformatf("t=%0d", t));
    end
    checks++;
    if (n_zero == 0) begin failures++; $display("FAIL no all-zero case"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
