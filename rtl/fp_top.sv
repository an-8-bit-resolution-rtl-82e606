// Fuzzy inference processor: top level.
//
// Evaluates a singleton-consequent fuzzy rule base on J inputs of N bits.
//   input stage     the input register file feeds one input per slot to two
//                   membership-function circuits (MFC), one per non-overlapping group of
//                   membership functions; each returns the single label of its group that
//                   may be non-zero for that input, and its membership value;
//   operation stage K operational elements (OPE) take both (label, value) pairs of each
//                   input and compute the matching score of their singleton, MAX over
//                   sub-rules of MIN over inputs;
//   output stage    the weighted-average circuit (WAC) reads the K scores through the MUX
//                   and forms sum(w*S)/sum(w) into the output register.
// The slot controller issues one input per slot of S = max(M,N)+1 cycles.  An inference
// occupies the input stage for J slots, so with back-to-back start requests a new result
// arrives every J*S cycles (72 at the defaults).  When start is sampled in the last cycle
// of a slot (ph == S-1), y_valid rises (J+3)*S + 2I + K + N + 4 clock edges later (127 at
// the defaults); a start raised earlier in a slot waits for the end of that slot.
//
// Configuration: all memories are written through the ports below before start.
//   mfm_*  : membership-function memories, mfm_we[g] selects group g, address {j, i},
//            data {a_i, A_i, B_i} (turning point, slope mantissa, slope shift);
//   lab_*  : label memories, lab_we[k] selects OPE k, address j*I + i, data {group, label};
//   sing_* : singleton positions S_k;  in_* : input register file.
// The block structure follows the document; the control and the configuration ports are
// this design's own.
module fp_top #(
  parameter int unsigned N   = fuzzy_pkg::N_DEF,
  parameter int unsigned M   = fuzzy_pkg::M_DEF,
  parameter int unsigned J   = fuzzy_pkg::J_DEF,
  parameter int unsigned K   = fuzzy_pkg::K_DEF,
  parameter int unsigned I   = fuzzy_pkg::I_DEF,
  parameter int unsigned S   = fuzzy_pkg::slot_len(M, N),
  parameter int unsigned BW  = $clog2(N),
  parameter int unsigned MW  = fuzzy_pkg::clog2_min1(M),
  parameter int unsigned LW  = (MW > 1) ? MW - 1 : 1,
  parameter int unsigned JW  = fuzzy_pkg::clog2_min1(J),
  parameter int unsigned KW  = fuzzy_pkg::clog2_min1(K),
  parameter int unsigned LAW = fuzzy_pkg::clog2_min1(J * I)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic             busy,
  input  logic             in_we,
  input  logic [JW-1:0]    in_waddr,
  input  logic [N-1:0]     in_wdata,
  input  logic [1:0]       mfm_we,
  input  logic [JW+MW-1:0] mfm_waddr,
  input  logic [2*N+BW-1:0] mfm_wdata,
  input  logic [K-1:0]     lab_we,
  input  logic [LAW-1:0]   lab_waddr,
  input  logic [LW:0]      lab_wdata,
  input  logic             sing_we,
  input  logic [KW-1:0]    sing_waddr,
  input  logic [N-1:0]     sing_wdata,
  output logic [N-1:0]     y,
  output logic             y_valid
);
  localparam int unsigned PW = $clog2(S);

  logic [PW-1:0] ph;
  logic          feed_valid;
  logic [JW-1:0] feed_j;
  logic [N-1:0]  x;

  fp_ctrl #(.J(J), .S(S)) u_ctrl (
    .clk, .rst_n, .start,
    .ph, .feed_valid, .feed_j, .busy
  );

  fp_input_regfile #(.N(N), .J(J)) u_inrf (
    .clk, .rst_n,
    .we (in_we), .waddr (in_waddr), .wdata (in_wdata),
    .raddr (feed_j), .rdata (x)
  );

  // ---------------- input stage: two membership-function circuits ------------------------
  logic          mv   [2];
  logic [JW-1:0] mj   [2];
  logic [LW-1:0] mlab [2];
  logic [N-1:0]  mval [2];
  logic          movf [2];

  for (genvar g = 0; g < 2; g++) begin : g_mfc
    fp_mfc #(.N(N), .M(M), .J(J), .S(S)) u_mfc (
      .clk, .rst_n, .ph,
      .in_valid  (feed_valid),
      .in_x      (x),
      .in_j      (feed_j),
      .mfm_we    (mfm_we[g]),
      .mfm_waddr (mfm_waddr),
      .mfm_wdata (mfm_wdata),
      .out_valid (mv[g]),
      .out_j     (mj[g]),
      .out_label (mlab[g]),
      .out_value (mval[g]),
      .out_ovf   (movf[g])
    );
  end

  // ---------------- operation stage: K operational elements ------------------------------
  logic [N-1:0] w  [K];
  logic [K-1:0] wv;

  for (genvar k = 0; k < K; k++) begin : g_ope
    fp_ope #(.N(N), .M(M), .J(J), .I(I), .S(S)) u_ope (
      .clk, .rst_n, .ph,
      .mfc_valid (mv[0]),
      .mfc_j     (mj[0]),
      .lab1      (mlab[0]),
      .val1      (mval[0]),
      .lab2      (mlab[1]),
      .val2      (mval[1]),
      .lab_we    (lab_we[k]),
      .lab_waddr (lab_waddr),
      .lab_wdata (lab_wdata),
      .w         (w[k]),
      .w_valid   (wv[k])
    );
  end

  // ---------------- output stage: MUX, weighted average, output register -----------------
  logic [KW-1:0] sel;
  logic [N-1:0]  wsel, yw;
  logic          wac_busy, wac_done;

  fp_mux #(.N(N), .K(K)) u_mux (.din (w), .sel (sel), .dout (wsel));

  fp_wac #(.N(N), .K(K)) u_wac (
    .clk, .rst_n,
    .start      (wv[0]),
    .sel        (sel),
    .w_in       (wsel),
    .sing_we    (sing_we),
    .sing_waddr (sing_waddr),
    .sing_wdata (sing_wdata),
    .busy       (wac_busy),
    .done       (wac_done),
    .y          (yw)
  );

  fp_output_reg #(.N(N)) u_oreg (.clk, .rst_n, .load (wac_done), .d (yw), .q (y), .q_valid (y_valid));

  // Both MFCs run in lock step, and the WAC finishes long before the next scores arrive.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (mv[0] == mv[1] && mj[0] == mj[1]) else $error("MFCs out of step");
      assert (!(wv[0] && wac_busy)) else $error("scores arrived while the WAC was busy");
      assert (wv == '0 || wv == '1) else $error("operational elements out of step");
    end
  end
endmodule
