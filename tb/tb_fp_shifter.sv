// Test of the shifter: random products and shift counts; the result must equal the
// product shifted right B times, saturated to all ones when it does not fit in N bits,
// and be ready B cycles after start.  Both saturated and unsaturated cases are counted.
module tb_fp_shifter;
  localparam int unsigned N = fuzzy_pkg::N_DEF;
  localparam int unsigned BW = $clog2(N);
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [2*N-1:0] din = '0;
  logic [BW-1:0] shamt = '0;
  logic busy, ovf;
  logic [N-1:0] dout;

  fp_shifter dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_sat = 0, n_plain = 0;

  task automatic shift_once(input int unsigned v, input int unsigned b);
    int unsigned n, e;
    bit eo;
    @(negedge clk);
    din = (2 * N)'(v); shamt = BW'(b); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    n = 0;
    while (busy) begin @(negedge clk); n++; end
    e = v >> b;
    eo = (e > (1 << N) - 1);
    if (eo) begin e = (1 << N) - 1; n_sat++; end else n_plain++;
    checks++;
    if (dout != N'(e) || ovf != eo || n != b) begin
      failures++;
      $display("FAIL %0d>>%0d: dout=%0d ovf=%0b after %0d cycles, expected %0d", v, b, dout, ovf, n, e);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    shift_once(0, 0);
    shift_once((1 << N) - 1, 0);
    shift_once(1 << N, 0);
    shift_once(1 << N, 1);
    shift_once((1 << (2 * N)) - 1, N - 1);
    for (int t = 0; t < 400; t++)
      shift_once($urandom_range(0, (1 << (2 * N)) - 1) >> $urandom_range(0, 2 * N - 1), $urandom_range(0, N - 1));
    $display("saturated=%0d plain=%0d", n_sat, n_plain);
    checks++;
    if (n_sat == 0 || n_plain == 0) failures++;
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
