// Workload: a 32-rule, 8-bit two-input controller run back to back at full rate.
//
// Inputs x_0 ("error") and x_1 ("change of error") each have 8 triangular labels with
// centres c_l = 36*l, peak width 0 and slopes of 227*2^-5 (about 255/36).  Labels alternate
// between the two groups (l even in group 0, l odd in group 1), so neighbours overlap and
// at most two are non-zero, as the processor requires.  Inputs x_2..x_7 are held at 100
// and use a single always-full label (a rising edge at 0 that saturates at once).
// Consequent k (singleton 36*k) holds four sub-rules: error label k together with change
// label k-2, k-1, k or k+1 (clamped to 0..7), 8 x 4 = 32 rules in all.
//
// 60 random (x_0, x_1) pairs are evaluated back to back; every result is compared with a
// reference computed here from the edge formula, results must follow each other every
// J*S cycles, and the resulting rate at a 10 MHz clock is reported and checked to be at
// least 138 k inferences per second.
module tb_fp_workload_32rules;
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
  localparam int unsigned RUNS = 60;
  localparam int unsigned STEP = 36;       // label spacing
  localparam int unsigned SA = 227, SB = 5;  // slope 227/32

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, busy;
  logic in_we = 1'b0; logic [JW-1:0] in_waddr = '0; logic [N-1:0] in_wdata = '0;
  logic [1:0] mfm_we = '0; logic [JW+MW-1:0] mfm_waddr = '0; logic [2*N+BW-1:0] mfm_wdata = '0;
  logic [K-1:0] lab_we = '0; logic [LAW-1:0] lab_waddr = '0; logic [LW:0] lab_wdata = '0;
  logic sing_we = 1'b0; logic [KW-1:0] sing_waddr = '0; logic [N-1:0] sing_wdata = '0;
  logic [N-1:0] y; logic y_valid;

  fp_top dut (.*);
  always #50 clk = ~clk;  // 10 MHz

  int checks = 0, failures = 0, n_nonzero = 0, n_spacing = 0;
  int unsigned ta [2][J][M], tA [2][J][M], tB [2][J][M];
  int unsigned tlab [K][I][J];
  int unsigned tsing [K];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic void mf_ref(input int g, input int j, input int unsigned x,
                                 output int unsigned lab, output int unsigned val);
    int sel;
    int unsigned p;
    sel = -1;
    for (int i = 0; i < M; i++) if (ta[g][j][i] <= x) sel = i;
    lab = 0; val = 0;
    if (sel < 0) return;
    p = ((x - ta[g][j][sel]) * tA[g][j][sel]) >> tB[g][j][sel];
    if (p > F) p = F;
    val = (sel % 2 == 1) ? F - p : p;
    lab = sel / 2;
  endfunction

  function automatic int unsigned infer_ref(input int unsigned xs [J]);
    int unsigned l1 [J], v1 [J], l2 [J], v2 [J];
    longint unsigned num, den;
    num = 0; den = 0;
    for (int j = 0; j < J; j++) begin
      mf_ref(0, j, xs[j], l1[j], v1[j]);
      mf_ref(1, j, xs[j], l2[j], v2[j]);
    end
    for (int k = 0; k < K; k++) begin
      int unsigned w;
      w = 0;
      for (int i = 0; i < I; i++) begin
        int unsigned mn;
        mn = F;
        for (int j = 0; j < J; j++) begin
          int unsigned code, mu;
          code = tlab[k][i][j];
          if ((code >> LW) == 0) mu = ((code & ((1 << LW) - 1)) == l1[j]) ? v1[j] : 0;
          else                   mu = ((code & ((1 << LW) - 1)) == l2[j]) ? v2[j] : 0;
          if (mu < mn) mn = mu;
        end
        if (mn > w) w = mn;
      end
      num += longint'(w) * longint'(tsing[k]);
      den += longint'(w);
    end
    return (den == 0) ? 0 : int'(num / den);
  endfunction

  task automatic put_edge(input int g, input int j, input int i,
                          input int unsigned a, input int unsigned sa, input int unsigned sb);
    ta[g][j][i] = a; tA[g][j][i] = sa; tB[g][j][i] = sb;
    @(negedge clk);
    mfm_we = 2'(1 << g); mfm_waddr = {JW'(j), MW'(i)}; mfm_wdata = {N'(a), N'(sa), BW'(sb)};
  endtask

  task automatic configure();
    // membership functions
    for (int j = 0; j < J; j++)
      for (int g = 0; g < 2; g++)
        for (int i = 0; i < M; i++) begin
          if (j < 2) begin
            // label l = 2*(i/2) + g has its peak at STEP*l; rising edge from STEP*(l-1)
            int unsigned l, c;
            l = 2 * (i / 2) + g;
            c = STEP * l;
            if (i % 2 == 0) begin
              if (l == 0) put_edge(g, j, i, 0, F, 0);           // left shoulder
              else        put_edge(g, j, i, c - STEP, SA, SB);
            end else begin
              put_edge(g, j, i, c, SA, SB);
            end
          end else begin
            if (i == 0) put_edge(g, j, i, 0, F, 0);             // always full for x >= 1
            else        put_edge(g, j, i, F, F, 0);             // never reached (x < 255)
          end
        end
    @(negedge clk) mfm_we = '0;
    // singletons
    for (int k = 0; k < K; k++) begin
      tsing[k] = STEP * k;
      @(negedge clk);
      sing_we = 1'b1; sing_waddr = KW'(k); sing_wdata = N'(tsing[k]);
    end
    @(negedge clk) sing_we = 1'b0;
    // rules: consequent k fires for error label k with change label k-2 .. k+1
    // (clamped to 0..7, so the edge consequents repeat a sub-rule)
    for (int k = 0; k < K; k++) begin
      for (int i = 0; i < I; i++) begin
        int le, ld;
        le = k;
        ld = k + i - 2;
        if (ld < 0) ld = 0;
        if (ld > 7) ld = 7;
        for (int j = 0; j < J; j++) begin
          int unsigned lab;
          lab = (j == 0) ? le : ld;
          tlab[k][i][j] = (j < 2) ? (((lab % 2) << LW) | (lab / 2)) : 0;
        end
      end
      for (int i = 0; i < I; i++)
        for (int j = 0; j < J; j++) begin
          @(negedge clk);
          lab_we = K'(1) << k; lab_waddr = LAW'(j * I + i); lab_wdata = (LW + 1)'(tlab[k][i][j]);
        end
    end
    @(negedge clk) lab_we = '0;
  endtask

  int unsigned xs [RUNS][J];
  int unsigned exp_y [RUNS];

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    configure();
    for (int r = 0; r < RUNS; r++) begin
      for (int j = 0; j < J; j++) xs[r][j] = (j < 2) ? $urandom_range(0, 254) : 100;
      exp_y[r] = infer_ref(xs[r]);
    end
    for (int j = 0; j < J; j++) begin
      @(negedge clk);
      in_we = 1'b1; in_waddr = JW'(j); in_wdata = N'(xs[0][j]);
    end
    @(negedge clk) in_we = 1'b0;

    fork
      // feeder: one run after another, each input reloaded right after it was taken
      begin
        while (dut.ph != PW'(S - 1)) @(negedge clk);
        for (int r = 0; r < RUNS; r++) begin
          for (int j = 0; j < J; j++) begin
            if (r == 0 && j == 0) start = 1'b1;
            else if (j == 0) start = 1'b0;
            while (!(dut.u_ctrl.feed_valid && dut.u_ctrl.feed_j == JW'(j) && dut.ph == PW'(S - 1)))
              @(negedge clk);
            @(negedge clk);
            start = (j == 2 && r < RUNS - 1);
            if (r < RUNS - 1) begin
              in_we = 1'b1; in_waddr = JW'(j); in_wdata = N'(xs[r + 1][j]);
            end
            @(negedge clk);
            in_we = 1'b0;
            start = 1'b0;
          end
        end
      end
      // checker
      begin
        int unsigned n, got;
        longint unsigned total;
        n = 0; got = 0; total = 0;
        while (got < RUNS) begin
          @(negedge clk);
          n++;
          if (y_valid) begin
            check(y == N'(exp_y[got]), $sformatf("run %0d (e=%0d d=%0d): y=%0d expected %0d",
                                                 got, xs[got][0], xs[got][1], y, exp_y[got]));
            if (exp_y[got] != 0) n_nonzero++;
            if (got > 0) begin
              check(n == J * S, $sformatf("run %0d spacing %0d expected %0d", got, n, J * S));
              total += n;
              n_spacing++;
            end
            n = 0;
            got++;
          end
        end
        // rate at 10 MHz, in inferences per second
        $display("%0d inferences back to back: %0d cycles each, %0d inferences/s at 10 MHz",
                 RUNS, total / (RUNS - 1), 10_000_000 * (RUNS - 1) / total);
        check(10_000_000 * (RUNS - 1) / total >= 138_000, "rate below 138 k inferences/s");
      end
    join
    $display("non-zero results: %0d of %0d", n_nonzero, RUNS);
    check(n_nonzero > RUNS / 4, "too few non-zero results");
    check(n_spacing == RUNS - 1, "missing results");
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
