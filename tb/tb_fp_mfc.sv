// Test of the membership-function circuit.
//
// A random group of M edges per input (ascending turning points, random slopes) is
// written into the circuit's memory.  A phase counter drives slots of S cycles and a new
// random input is offered in most slots.  Every output slot is compared with a reference
// evaluation of the piecewise-linear membership formula: last edge with a_i <= x, value
// min((x-a_i)*A_i >> B_i, F), inverted for odd edges, label i/2, and 0 below a_0.  The
// output must appear exactly three slots after the input was taken.  The test counts
// inputs below every edge, saturated products, rising and falling edges.
module tb_fp_mfc;
  localparam int unsigned N = fuzzy_pkg::N_DEF;
  localparam int unsigned M = fuzzy_pkg::M_DEF;
  localparam int unsigned J = fuzzy_pkg::J_DEF;
  localparam int unsigned S = fuzzy_pkg::slot_len(M, N);
  localparam int unsigned BW = $clog2(N);
  localparam int unsigned MW = $clog2(M);
  localparam int unsigned JW = $clog2(J);
  localparam int unsigned PW = $clog2(S);
  localparam int unsigned LW = MW - 1;
  localparam int unsigned F = (1 << N) - 1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [PW-1:0] ph = '0;
  logic in_valid = 1'b0; logic [N-1:0] in_x = '0; logic [JW-1:0] in_j = '0;
  logic mfm_we = 1'b0; logic [JW+MW-1:0] mfm_waddr = '0; logic [2*N+BW-1:0] mfm_wdata = '0;
  logic out_valid; logic [JW-1:0] out_j; logic [LW-1:0] out_label; logic [N-1:0] out_value;
  logic out_ovf;

  fp_mfc dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_below = 0, n_sat = 0, n_rise = 0, n_fall = 0, n_idle = 0;
  int unsigned ta [J][M], tA [J][M], tB [J][M];

  typedef struct { bit v; int unsigned j, lab, val; bit sat; } exp_t;
  exp_t pipe [4];  // entry 0: taken this slot, entry 3: due now

  function automatic exp_t ref_mf(input bit v, input int unsigned j, input int unsigned x);
    exp_t e;
    int sel = -1;
    int unsigned p;
    e.v = v; e.j = j; e.lab = 0; e.val = 0; e.sat = 0;
    for (int i = 0; i < M; i++) if (ta[j][i] <= x) sel = i;
    if (sel < 0) return e;
    p = ((x - ta[j][sel]) * tA[j][sel]) >> tB[j][sel];
    if (p > F) begin p = F; e.sat = 1; end
    e.val = (sel % 2 == 1) ? F - p : p;
    e.lab = sel / 2;
    return e;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int j = 0; j < J; j++) begin
      int unsigned a;
      a = $urandom_range(1, 40);
      for (int i = 0; i < M; i++) begin
        if (i > 0) a = a + $urandom_range(1, 29);
        ta[j][i] = a;
        tA[j][i] = $urandom_range(1, F);
        tB[j][i] = $urandom_range(0, N - 1);
        @(negedge clk);
        mfm_we = 1'b1; mfm_waddr = {JW'(j), MW'(i)};
        mfm_wdata = {N'(ta[j][i]), N'(tA[j][i]), BW'(tB[j][i])};
      end
    end
    @(negedge clk) mfm_we = 1'b0;
    for (int s = 0; s < 4; s++) pipe[s].v = 0;

    // slots: ph runs 0..S-1, inputs are taken at ph == S-1
    for (int slot = 0; slot < 400; slot++) begin
      for (int p = 0; p < S; p++) begin
        ph = PW'(p);
        if (p == S - 1) begin
          int unsigned x, j;
          bit v;
          v = ($urandom_range(0, 9) != 0);
          x = (slot % 13 == 0) ? 0 : $urandom_range(0, F);
          j = $urandom_range(0, J - 1);
          in_valid = v; in_x = N'(x); in_j = JW'(j);
          pipe[3] = pipe[2]; pipe[2] = pipe[1]; pipe[1] = pipe[0];
          pipe[0] = ref_mf(v, j, x);
        end
        @(negedge clk);
      end
      // outputs loaded at the slot boundary now hold the entry taken three slots ago
      check(out_valid == pipe[3].v, $sformatf("slot %0d valid %0d expected %0d", slot, out_valid, pipe[3].v));
      if (pipe[3].v) begin
        check(out_j == JW'(pipe[3].j), $sformatf("slot %0d j", slot));
        check(out_label == LW'(pipe[3].lab), $sformatf("slot %0d label %0d expected %0d", slot, out_label, pipe[3].lab));
        check(out_value == N'(pipe[3].val), $sformatf("slot %0d value %0d expected %0d", slot, out_value, pipe[3].val));
        check(out_ovf == pipe[3].sat, $sformatf("slot %0d ovf", slot));
      end
    end

    // count the cases covered
    for (int j = 0; j < J; j++)
      for (int x = 0; x <= F; x++) begin
        exp_t e;
        e = ref_mf(1, j, x);
        if (x < int'(ta[j][0])) n_below++;
        else if (e.sat) n_sat++;
      end
    $display("cases in the tables: below=%0d saturated=%0d", n_below, n_sat);
    check(n_below > 0 && n_sat > 0, "tables miss a case");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
