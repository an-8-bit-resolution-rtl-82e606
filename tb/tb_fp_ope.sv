// Test of the operational element.
//
// Random label memories are written; then inferences are run by presenting, one slot per
// input, random (label, value) pairs of both membership-function circuits, with idle
// slots in between.  Labels are drawn so that hits and misses in both groups occur.  The
// matching score is checked against MAX over sub-rules of MIN over inputs computed here,
// w_valid must rise exactly once per inference, 2I edges into the last input's slot, and
// w must hold during the next inference.
module tb_fp_ope;
  localparam int unsigned N = fuzzy_pkg::N_DEF;
  localparam int unsigned M = fuzzy_pkg::M_DEF;
  localparam int unsigned J = fuzzy_pkg::J_DEF;
  localparam int unsigned I = fuzzy_pkg::I_DEF;
  localparam int unsigned S = fuzzy_pkg::slot_len(M, N);
  localparam int unsigned MW = $clog2(M);
  localparam int unsigned LW = MW - 1;
  localparam int unsigned JW = $clog2(J);
  localparam int unsigned LAW = $clog2(J * I);
  localparam int unsigned PW = $clog2(S);

  logic clk = 1'b0, rst_n = 1'b0;
  logic [PW-1:0] ph = '0;
  logic mfc_valid = 1'b0; logic [JW-1:0] mfc_j = '0;
  logic [LW-1:0] lab1 = '0, lab2 = '0; logic [N-1:0] val1 = '0, val2 = '0;
  logic lab_we = 1'b0; logic [LAW-1:0] lab_waddr = '0; logic [LW:0] lab_wdata = '0;
  logic [N-1:0] w; logic w_valid;

  fp_ope dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_hit1 = 0, n_hit2 = 0, n_miss = 0, n_nz = 0;
  int unsigned tlab [I][J];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int unsigned l1 [J], v1 [J], l2 [J], v2 [J];
    int unsigned exp_w, prev_w;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    prev_w = 0;
    for (int t = 0; t < 60; t++) begin
      // MFC outputs for this inference
      for (int j = 0; j < J; j++) begin
        l1[j] = $urandom_range(0, (1 << LW) - 1); v1[j] = $urandom_range(0, (1 << N) - 1);
        l2[j] = $urandom_range(0, (1 << LW) - 1); v2[j] = $urandom_range(0, (1 << N) - 1);
      end
      // label memory: mostly hits
      for (int i = 0; i < I; i++)
        for (int j = 0; j < J; j++) begin
          int unsigned r;
          r = $urandom_range(0, 9);
          if (r < 4)      tlab[i][j] = l1[j];
          else if (r < 8) tlab[i][j] = (1 << LW) | l2[j];
          else            tlab[i][j] = $urandom_range(0, (1 << (LW + 1)) - 1);
          @(negedge clk);
          lab_we = 1'b1; lab_waddr = LAW'(j * I + i); lab_wdata = (LW + 1)'(tlab[i][j]);
        end
      @(negedge clk) lab_we = 1'b0;
      // reference
      exp_w = 0;
      for (int i = 0; i < I; i++) begin
        int unsigned mn;
        mn = (1 << N) - 1;
        for (int j = 0; j < J; j++) begin
          int unsigned mu;
          if ((tlab[i][j] >> LW) == 0) begin
            mu = ((tlab[i][j] & ((1 << LW) - 1)) == l1[j]) ? v1[j] : 0;
            if (mu == v1[j] && (tlab[i][j] & ((1 << LW) - 1)) == l1[j]) n_hit1++; else n_miss++;
          end else begin
            mu = ((tlab[i][j] & ((1 << LW) - 1)) == l2[j]) ? v2[j] : 0;
            if ((tlab[i][j] & ((1 << LW) - 1)) == l2[j]) n_hit2++; else n_miss++;
          end
          if (mu < mn) mn = mu;
        end
        if (mn > exp_w) exp_w = mn;
      end
      if (exp_w != 0) n_nz++;
      // align to a slot start (ph == 0 next cycle)
      while (ph != PW'(S - 1)) begin @(negedge clk); ph = (ph == PW'(S - 1)) ? '0 : ph + 1'b1; end
      for (int j = 0; j < J; j++) begin
        bit idle;
        idle = ($urandom_range(0, 4) == 0);
        if (idle) begin
          // an idle slot: nothing may change
          mfc_valid = 1'b0;
          for (int p = 0; p < S; p++) begin
            @(negedge clk); ph = PW'(p);
            check(!w_valid && w == N'(prev_w), "idle slot disturbed w");
          end
        end
        mfc_valid = 1'b1; mfc_j = JW'(j);
        lab1 = LW'(l1[j]); val1 = N'(v1[j]); lab2 = LW'(l2[j]); val2 = N'(v2[j]);
        for (int p = 0; p < S; p++) begin
          ph = PW'(p);
          @(negedge clk);
          // w_valid is registered at the end of phase 2I-1
          if (j == J - 1 && p == 2 * I - 1) begin
            check(w_valid, $sformatf("t=%0d w_valid missing", t));
            check(w == N'(exp_w), $sformatf("t=%0d w=%0d expected %0d", t, w, exp_w));
          end else begin
            check(!w_valid, $sformatf("t=%0d spurious w_valid at j=%0d p=%0d", t, j, p));
            if (j < J - 1 || p < 2 * I - 1)
              check(w == N'(prev_w), $sformatf("t=%0d w changed early", t));
          end
        end
        mfc_valid = 1'b0;
      end
      prev_w = exp_w;
    end
    $display("hit1=%0d hit2=%0d miss=%0d nonzero=%0d", n_hit1, n_hit2, n_miss, n_nz);
    check(n_hit1 > 0 && n_hit2 > 0 && n_miss > 0 && n_nz > 0, "a case was not covered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
