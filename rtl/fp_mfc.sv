// Membership-function circuit (MFC): label and membership value of one group for one input.
//
// The membership functions of an input are split into two groups whose members do not
// overlap, so at most one function per group is non-zero for any x.  A group is stored as
// a list of edges in ascending order of turning point a_i; even edges rise from a_i, odd
// edges fall from a_i.  For input x this circuit finds the last edge with a_i <= x and
// evaluates
//     rising  (i even): g = min((x - a_i) * alpha_i, F)
//     falling (i odd) : g = max(F - (x - a_i) * alpha_i, 0) = ~min((x - a_i) * alpha_i, F)
// with alpha_i = A_i * 2^-B_i and F the all-ones value.  The label is i >> 1.  If x lies
// below every a_i the output is label 0 with value 0.
//
// Three pipeline stages, each one slot of S = max(M,N)+1 cycles; stages advance together
// at the last cycle of a slot (ph == S-1), where in_x/in_j are also sampled when in_valid:
//   1. scan: for i = 0..M-1, read {a_i, A_i, B_i} from the group memory into RE2..
//      (registered read), subtract RE1 - RE2 a cycle later, and when the sign is clear
//      store A_i, B_i, i and the difference in RE3, RE4, RE5, RE6;
//   2. multiply RE6 by RE3 with the shift-and-add multiplier (N cycles);
//   3. shift the product right B_i times, saturate on overflow, and invert all bits when
//      the edge index is odd (the gate).
// The result appears in out_* three slots after the input was sampled and is held for
// one slot.  out_ovf reports that the shifter saturated.
//
// The stages, registers and the odd/even inversion follow the document; the pipeline
// registers between the stages, the {j, i} memory address and the not-found rule are this
// design's own.
module fp_mfc #(
  parameter int unsigned N  = fuzzy_pkg::N_DEF,
  parameter int unsigned M  = fuzzy_pkg::M_DEF,
  parameter int unsigned J  = fuzzy_pkg::J_DEF,
  parameter int unsigned S  = fuzzy_pkg::slot_len(M, N),
  parameter int unsigned BW = $clog2(N),
  parameter int unsigned MW = fuzzy_pkg::clog2_min1(M),
  parameter int unsigned JW = fuzzy_pkg::clog2_min1(J),
  parameter int unsigned PW = $clog2(S),
  parameter int unsigned LW = (MW > 1) ? MW - 1 : 1,
  parameter int unsigned DW = 2 * N + BW
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [PW-1:0]    ph,
  input  logic             in_valid,
  input  logic [N-1:0]     in_x,
  input  logic [JW-1:0]    in_j,
  input  logic             mfm_we,
  input  logic [JW+MW-1:0] mfm_waddr,
  input  logic [DW-1:0]    mfm_wdata,
  output logic             out_valid,
  output logic [JW-1:0]    out_j,
  output logic [LW-1:0]    out_label,
  output logic [N-1:0]     out_value,
  output logic             out_ovf
);
  initial begin
    assert (S >= M + 1 && S >= N) else $error("slot too short for the scan or the multiplier");
    assert (M % 2 == 0) else $error("M must be even: edges come in rising/falling pairs");
  end

  logic adv;
  assign adv = (ph == PW'(S - 1));

  // ---------------- stage 1: scan and subtract -----------------------------------------
  logic [N-1:0]  re1;            // input x
  logic [JW-1:0] j1;
  logic          v1;
  logic [MW:0]   cnt;            // edge counter CNT
  logic          rd_v;           // RE2.. hold a word read last cycle
  logic [N-1:0]  re2;            // a_i
  logic [N-1:0]  pa;             // A_i read with a_i
  logic [BW-1:0] pb;             // B_i read with a_i
  logic [MW-1:0] pi;             // i read with a_i
  logic [N-1:0]  re3, re3_n;     // A_i of the selected edge
  logic [BW-1:0] re4, re4_n;     // B_i
  logic [MW-1:0] re5, re5_n;     // i
  logic [N-1:0]  re6, re6_n;     // x - a_i
  logic          fnd, fnd_n;     // some edge had a_i <= x
  logic [N:0]    diff;
  logic [DW-1:0] word;

  fp_mfm #(.N(N), .M(M), .J(J)) u_mfm (
    .clk   (clk),
    .we    (mfm_we),
    .waddr (mfm_waddr),
    .wdata (mfm_wdata),
    .raddr ({j1, cnt[MW-1:0]}),
    .rdata (word)
  );

  assign diff = {1'b0, re1} - {1'b0, re2};

  always_comb begin
    re3_n = re3; re4_n = re4; re5_n = re5; re6_n = re6; fnd_n = fnd;
    if (rd_v && !diff[N]) begin  // sign bit clear: x >= a_i
      re3_n = pa;
      re4_n = pb;
      re5_n = pi;
      re6_n = diff[N-1:0];
      fnd_n = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      re1 <= '0; j1 <= '0; v1 <= 1'b0; cnt <= '0; rd_v <= 1'b0;
      re2 <= '0; pa <= '0; pb <= '0; pi <= '0;
      re3 <= '0; re4 <= '0; re5 <= '0; re6 <= '0; fnd <= 1'b0;
    end else if (adv) begin
      re1  <= in_x;
      j1   <= in_j;
      v1   <= in_valid;
      cnt  <= '0;
      rd_v <= 1'b0;
      fnd  <= 1'b0;
    end else begin
      re3 <= re3_n; re4 <= re4_n; re5 <= re5_n; re6 <= re6_n; fnd <= fnd_n;
      if (cnt < (MW + 1)'(M)) begin
        re2  <= word[DW-1 -: N];
        pa   <= word[BW +: N];
        pb   <= word[BW-1:0];
        pi   <= cnt[MW-1:0];
        rd_v <= 1'b1;
        cnt  <= cnt + 1'b1;
      end else begin
        rd_v <= 1'b0;
      end
    end
  end

  // ---------------- stage 2: multiply ----------------------------------------------------
  logic          v2, f2;
  logic [JW-1:0] j2;
  logic [BW-1:0] b2;
  logic [MW-1:0] i2;
  logic [2*N-1:0] prod;
  logic           mul_busy, mul_done;

  fp_mul #(.N(N)) u_mul (
    .clk   (clk),
    .rst_n (rst_n),
    .start (adv),
    .a     (re3_n),
    .b     (re6_n),
    .busy  (mul_busy),
    .done  (mul_done),
    .p     (prod)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v2 <= 1'b0; f2 <= 1'b0; j2 <= '0; b2 <= '0; i2 <= '0;
    end else if (adv) begin
      v2 <= v1; f2 <= fnd_n; j2 <= j1; b2 <= re4_n; i2 <= re5_n;
    end
  end

  // ---------------- stage 3: shift, saturate, gate ---------------------------------------
  logic          v3, f3;
  logic [JW-1:0] j3;
  logic [MW-1:0] i3;
  logic [N-1:0]  sft_out;
  logic          sft_busy, sft_ovf;

  fp_shifter #(.N(N)) u_sft (
    .clk   (clk),
    .rst_n (rst_n),
    .start (adv),
    .din   (prod),
    .shamt (b2),
    .busy  (sft_busy),
    .ovf   (sft_ovf),
    .dout  (sft_out)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v3 <= 1'b0; f3 <= 1'b0; j3 <= '0; i3 <= '0;
    end else if (adv) begin
      v3 <= v2; f3 <= f2; j3 <= j2; i3 <= i2;
    end
  end

  // ---------------- output register ------------------------------------------------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_j <= '0; out_label <= '0; out_value <= '0; out_ovf <= 1'b0;
    end else if (adv) begin
      out_valid <= v3;
      out_j     <= j3;
      out_label <= f3 ? LW'(i3 >> 1) : '0;
      out_value <= !f3 ? '0 : (i3[0] ? ~sft_out : sft_out);
      out_ovf   <= f3 && sft_ovf;
    end
  end

  // The multiplier and shifter must finish inside their slot.
  always_ff @(posedge clk) begin
    if (rst_n && adv) begin
      assert (!mul_busy) else $error("multiplier still busy at slot end");
      assert (!sft_busy) else $error("shifter still busy at slot end");
    end
  end
endmodule
