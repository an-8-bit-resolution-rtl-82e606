// End-to-end test of the fuzzy inference processor at its default size.
//
// Random rule bases are written into the membership-function, label and singleton
// memories, inputs into the input register file, and every result is compared with a
// reference computed here directly from the membership formulas:
//   rising edge i (even): min((x-a_i)*A_i >> B_i, F),  falling edge (odd): F minus that,
//   score w_k = MAX_i MIN_j mu(A_ij, x_j),  y = floor(sum w*S / sum w), 0 if sum w = 0.
// It checks the latency of a single inference, the J*S-cycle spacing of back-to-back
// inferences, and counts the mechanisms that occurred: input below every turning point,
// shifter saturation, rising and falling edges, label hits and misses in both groups, an
// all-zero score set, and a start request queued while a run was in progress.
module tb_fp_top;
  localparam int unsigned N = fuzzy_pkg::N_DEF;
  localparam int unsigned M = fuzzy_pkg::M_DEF;
  localparam int unsigned J = fuzzy_pkg::J_DEF;
  localparam int unsigned K = fuzzy_pkg::K_DEF;
  localparam int unsigned I = fuzzy_pkg::I_DEF;
  localparam int unsigned S = fuzzy_pkg::slot_len(M, N);
  localparam int unsigned BW = $clog2(N);
  localparam int unsigned MW = $clog2(M);
  localparam int unsigned JW = $clog2(J);
  localparam int unsigned KW = $clog2(K);
  localparam int unsigned LW = MW - 1;
  localparam int unsigned LAW = $clog2(J * I);
  localparam int unsigned PW = $clog2(S);
  localparam int unsigned F = (1 << N) - 1;
  localparam int unsigned LATENCY = (J + 3) * S + 2 * I + K + N + 4;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, busy;
  logic in_we = 1'b0; logic [JW-1:0] in_waddr = '0; logic [N-1:0] in_wdata = '0;
  logic [1:0] mfm_we = '0; logic [JW+MW-1:0] mfm_waddr = '0; logic [2*N+BW-1:0] mfm_wdata = '0;
  logic [K-1:0] lab_we = '0; logic [LAW-1:0] lab_waddr = '0; logic [LW:0] lab_wdata = '0;
  logic sing_we = 1'b0; logic [KW-1:0] sing_waddr = '0; logic [N-1:0] sing_wdata = '0;
  logic [N-1:0] y; logic y_valid;

  fp_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // reference copies of the configuration
  int unsigned ta [2][J][M], tA [2][J][M], tB [2][J][M];
  int unsigned tlab [K][I][J];
  int unsigned tsing [K];
  int unsigned tx [J];

  // mechanism counters
  int n_below = 0, n_sat = 0, n_rise = 0, n_fall = 0, n_hit1 = 0, n_hit2 = 0, n_miss = 0;
  int n_zero = 0, n_queued = 0, n_b2b = 0, n_nonzero = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // label and value of group g for input j at x
  function automatic void mf_ref(input int g, input int j, input int unsigned x,
                                 output int unsigned lab, output int unsigned val,
                                 input bit count);
    int sel = -1;
    int unsigned p;
    for (int i = 0; i < M; i++) if (ta[g][j][i] <= x) sel = i;
    if (sel < 0) begin
      lab = 0; val = 0;
      if (count) n_below++;
      return;
    end
    p = ((x - ta[g][j][sel]) * tA[g][j][sel]) >> tB[g][j][sel];
    if (p > F) begin
      p = F;
      if (count) n_sat++;
    end
    if (sel % 2 == 1) begin
      val = F - p;
      if (count) n_fall++;
    end else begin
      val = p;
      if (count) n_rise++;
    end
    lab = sel / 2;
  endfunction

  function automatic int unsigned infer_ref(input bit count);
    int unsigned l1 [J], v1 [J], l2 [J], v2 [J];
    longint unsigned num = 0, den = 0;
    for (int j = 0; j < J; j++) begin
      mf_ref(0, j, tx[j], l1[j], v1[j], count);
      mf_ref(1, j, tx[j], l2[j], v2[j], count);
    end
    for (int k = 0; k < K; k++) begin
      int unsigned w = 0;
      for (int i = 0; i < I; i++) begin
        int unsigned mn = F;
        for (int j = 0; j < J; j++) begin
          int unsigned code = tlab[k][i][j];
          int unsigned mu;
          int unsigned g = code >> LW;
          int unsigned l = code & ((1 << LW) - 1);
          if (g == 0) mu = (l == l1[j]) ? v1[j] : 0;
          else        mu = (l == l2[j]) ? v2[j] : 0;
          if (count) begin
            if (g == 0 && l == l1[j]) n_hit1++;
            else if (g == 1 && l == l2[j]) n_hit2++;
            else n_miss++;
          end
          if (mu < mn) mn = mu;
        end
        if (mn > w) w = mn;
      end
      num += longint'(w) * tsing[k];
      den += longint'(w);
    end
    if (den == 0) begin
      if (count) n_zero++;
      return 0;
    end
    return int'(num / den);
  endfunction

  // gentle: slopes of at most 2 per step, so most memberships are neither 0 nor F
  task automatic write_mfm(input bit gentle);
    for (int g = 0; g < 2; g++)
      for (int j = 0; j < J; j++) begin
        int unsigned a = $urandom_range(0, 40);
        for (int i = 0; i < M; i++) begin
          if (i > 0) a = a + $urandom_range(1, 29);
          ta[g][j][i] = a;
          tA[g][j][i] = $urandom_range(1, F);
          tB[g][j][i] = gentle ? $urandom_range(N - 2, N - 1) : $urandom_range(0, N - 1);
          @(negedge clk);
          mfm_we    = 2'(1 << g);
          mfm_waddr = {JW'(j), MW'(i)};
          mfm_wdata = {N'(ta[g][j][i]), N'(tA[g][j][i]), BW'(tB[g][j][i])};
        end
      end
    @(negedge clk) mfm_we = '0;
  endtask

  task automatic write_inputs();
    for (int j = 0; j < J; j++) begin
      @(negedge clk);
      in_we = 1'b1; in_waddr = JW'(j); in_wdata = N'(tx[j]);
    end
    @(negedge clk) in_we = 1'b0;
  endtask

  // labels: mostly the label that is active for the current inputs, so scores are non-zero
  task automatic write_labels(input int hit_pct);
    int unsigned l, v, l2, v2;
    for (int k = 0; k < K; k++)
      for (int i = 0; i < I; i++)
        for (int j = 0; j < J; j++) begin
          int unsigned g;
          // prefer the group whose label is non-zero at x_j
          mf_ref(0, j, tx[j], l, v, 1'b0);
          mf_ref(1, j, tx[j], l2, v2, 1'b0);
          g = (v2 > v || (v2 == v && $urandom_range(0, 1) == 1)) ? 1 : 0;
          if (g == 1) l = l2;
          if ($urandom_range(0, 99) < hit_pct) tlab[k][i][j] = (g << LW) | l;
          else tlab[k][i][j] = $urandom_range(0, (1 << (LW + 1)) - 1);
          @(negedge clk);
          lab_we = K'(1) << k; lab_waddr = LAW'(j * I + i); lab_wdata = (LW + 1)'(tlab[k][i][j]);
        end
    @(negedge clk) lab_we = '0;
  endtask

  task automatic write_singletons();
    for (int k = 0; k < K; k++) begin
      tsing[k] = $urandom_range(0, F);
      @(negedge clk);
      sing_we = 1'b1; sing_waddr = KW'(k); sing_wdata = N'(tsing[k]);
    end
    @(negedge clk) sing_we = 1'b0;
  endtask

  task automatic random_inputs();
    for (int j = 0; j < J; j++) tx[j] = $urandom_range(30, 200);
  endtask

  // one inference, start given in the last cycle of a slot; checks result and latency
  // (counted in clock edges from the edge that samples start to the edge that raises y_valid)
  task automatic run_one(input string tag);
    int unsigned exp_y;
    int unsigned n;
    exp_y = infer_ref(1'b1);
    while (dut.ph != PW'(S - 1)) @(negedge clk);
    start = 1'b1;
    @(negedge clk) start = 1'b0;
    n = 0;
    while (!y_valid) begin
      @(negedge clk);
      n++;
    end
    check(y == N'(exp_y), $sformatf("%s: y=%0d expected %0d", tag, y, exp_y));
    check(n == LATENCY, $sformatf("%s: latency %0d expected %0d", tag, n, LATENCY));
    if (exp_y != 0) n_nonzero++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // ---- single inferences on random rule bases
    for (int t = 0; t < 12; t++) begin
      write_mfm(t % 3 != 0);
      write_singletons();
      random_inputs();
      if (t == 0) for (int j = 0; j < J; j++) tx[j] = 0;  // below most turning points
      write_inputs();
      write_labels(t == 0 ? 100 : 85);
      run_one($sformatf("single %0d", t));
    end

    // ---- all labels miss: every score is 0
    for (int j = 0; j < J; j++) tx[j] = $urandom_range(0, F);
    write_inputs();
    for (int k = 0; k < K; k++)
      for (int i = 0; i < I; i++)
        for (int j = 0; j < J; j++) begin
          int unsigned l1, v1, l2, v2;
          mf_ref(0, j, tx[j], l1, v1, 1'b0);
          mf_ref(1, j, tx[j], l2, v2, 1'b0);
          tlab[k][i][j] = (j == 0) ? ((l1 + 1) % (1 << LW)) : l1;  // group 0, wrong label on x_1
          @(negedge clk);
          lab_we = K'(1) << k; lab_waddr = LAW'(j * I + i); lab_wdata = (LW + 1)'(tlab[k][i][j]);
        end
    @(negedge clk) lab_we = '0;
    run_one("all scores zero");

    // ---- back-to-back inferences: inputs rewritten while the previous run is in flight
    begin
      int unsigned exp_q [$];
      int got;
      got = 0;
      write_mfm(1'b1);
      write_singletons();
      random_inputs();
      write_inputs();
      write_labels(100);
      fork
        begin
          for (int r = 0; r < 4; r++) begin
            int unsigned nx [J];
            exp_q.push_back(infer_ref(1'b1));
            for (int j = 0; j < J; j++) nx[j] = $urandom_range(30, 200);
            if (r == 0) begin
              while (dut.ph != PW'(S - 1)) @(negedge clk);
              start = 1'b1;
              @(negedge clk) start = 1'b0;
            end
            // as soon as input j has been taken, load input j of the next run
            for (int j = 0; j < J; j++) begin
              while (!(dut.u_ctrl.feed_valid && dut.u_ctrl.feed_j == JW'(j) && dut.ph == PW'(S - 1)))
                @(negedge clk);
              @(negedge clk);
              in_we = 1'b1; in_waddr = JW'(j); in_wdata = N'(nx[j]);
              if (j == 2 && r < 3) start = 1'b1;  // request the next run during this one
              @(negedge clk);
              in_we = 1'b0;
              if (start) begin
                start = 1'b0;
                n_queued += (dut.u_ctrl.pend) ? 1 : 0;
              end
            end
            for (int j = 0; j < J; j++) tx[j] = nx[j];
          end
        end
        begin
          int unsigned n;
          n = 0;
          while (got < 4) begin
            @(negedge clk);
            n++;
            if (y_valid) begin
              check(y == N'(exp_q[got]), $sformatf("b2b %0d: y=%0d expected %0d", got, y, exp_q[got]));
              if (exp_q[got] != 0) n_nonzero++;
              if (got > 0) begin
                check(n == J * S, $sformatf("b2b spacing %0d expected %0d", n, J * S));
                n_b2b++;
              end
              n = 0;
              got++;
            end
          end
        end
      join
    end

    // ---- every mechanism must have happened
    $display("mechanisms: nonzero=%0d", n_nonzero);
    check(n_nonzero > 0, "no inference with a non-zero result");
    $display("mechanisms: below=%0d sat=%0d rise=%0d fall=%0d hit1=%0d hit2=%0d miss=%0d zero=%0d queued=%0d b2b=%0d",
             n_below, n_sat, n_rise, n_fall, n_hit1, n_hit2, n_miss, n_zero, n_queued, n_b2b);
    check(n_below > 0, "no input below every turning point");
    check(n_sat > 0, "no shifter saturation");
    check(n_rise > 0, "no rising edge");
    check(n_fall > 0, "no falling edge");
    check(n_hit1 > 0 && n_hit2 > 0, "no label hit in one of the groups");
    check(n_miss > 0, "no label miss");
    check(n_zero > 0, "no all-zero score set");
    check(n_queued > 0, "no start queued during a run");
    check(n_b2b == 3, "back-to-back results missing");

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
