// Test of the shift-and-add multiplier: corner operands and random ones, each product
// compared with the arithmetic product, and the N-cycle latency from start to done.
module tb_fp_mul;
  localparam int unsigned N = fuzzy_pkg::N_DEF;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [N-1:0] a = '0, b = '0;
  logic busy, done;
  logic [2*N-1:0] p;

  fp_mul dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic mul_once(input int unsigned x, input int unsigned y);
    int unsigned n = 0;
    @(negedge clk);
    a = N'(x); b = N'(y); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    a = N'($urandom);  // operands must have been captured
    b = N'($urandom);
    n = 0;
    while (!done) begin @(negedge clk); n++; end
    checks++;
    if (p != (2 * N)'(x * y) || n != N) begin
      failures++;
      $display("FAIL %0d*%0d: p=%0d after %0d cycles", x, y, p, n);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    mul_once(0, 0);
    mul_once((1 << N) - 1, (1 << N) - 1);
    mul_once(1, (1 << N) - 1);
    mul_once((1 << N) - 1, 1);
    for (int t = 0; t < 300; t++) mul_once($urandom_range(0, (1 << N) - 1), $urandom_range(0, (1 << N) - 1));
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
