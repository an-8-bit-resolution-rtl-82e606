// Operational element (OPE): matching score of one singleton consequent.
//
// An OPE evaluates one combined rule
//     IF {A_11(x_1),...,A_1J(x_J)} or ... or {A_I1(x_1),...,A_IJ(x_J)} THEN S_k
// and produces its matching score  w_k = MAX_i MIN_j mu_{A_ij}(x_j).
// The labels A_ij are held in a label memory in the order A_11, A_21, ..., A_I1, A_12, ...
// (address j*I + i).  A label code is {group, label-in-group}: its MSB picks the first
// (0) or second (1) membership-function circuit, and the membership of the label is that
// circuit's value if the circuit reports the same label, else 0.  A register file of I
// words keeps the running MIN of each sub-rule across the inputs.
//
// Timing: the MFC outputs for input j are held for one slot.  Sub-rule i is handled in
// phases 2i (read label memory and register file) and 2i+1 (MIN, write back), so a slot
// of S >= 2I cycles serves I sub-rules.  For j = 0 the MIN starts from the membership
// itself; for j = J-1 the MAX over sub-rules is formed on the fly and w is updated, with
// a one-cycle w_valid, in phase 2I-1.  w holds its value until the next inference's last
// input.
//
// The rule form, the label memory order and MIN/MAX follow the document; the two-cycle
// sub-rule step follows its remark that the register-file RAM needs one more cycle per
// access; the label code and the exact circuit are this design's own.
module fp_ope #(
  parameter int unsigned N   = fuzzy_pkg::N_DEF,
  parameter int unsigned M   = fuzzy_pkg::M_DEF,
  parameter int unsigned J   = fuzzy_pkg::J_DEF,
  parameter int unsigned I   = fuzzy_pkg::I_DEF,
  parameter int unsigned S   = fuzzy_pkg::slot_len(M, N),
  parameter int unsigned MW  = fuzzy_pkg::clog2_min1(M),
  parameter int unsigned LW  = (MW > 1) ? MW - 1 : 1,    // label within a group
  parameter int unsigned CW  = LW + 1,                   // label code {group, label}
  parameter int unsigned JW  = fuzzy_pkg::clog2_min1(J),
  parameter int unsigned IW  = fuzzy_pkg::clog2_min1(I),
  parameter int unsigned LAW = fuzzy_pkg::clog2_min1(J * I),
  parameter int unsigned PW  = $clog2(S)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [PW-1:0]  ph,
  input  logic           mfc_valid,
  input  logic [JW-1:0]  mfc_j,
  input  logic [LW-1:0]  lab1,
  input  logic [N-1:0]   val1,
  input  logic [LW-1:0]  lab2,
  input  logic [N-1:0]   val2,
  input  logic           lab_we,
  input  logic [LAW-1:0] lab_waddr,
  input  logic [CW-1:0]  lab_wdata,
  output logic [N-1:0]   w,
  output logic           w_valid
);
  initial assert (2 * I <= S) else $error("I sub-rules do not fit in a slot");

  logic [CW-1:0] labmem [2**LAW];
  logic [N-1:0]  rf [I];

  logic [IW-1:0]  r;          // current sub-rule
  logic           act;        // phase belongs to a sub-rule step
  logic [LAW-1:0] raddr;
  logic [CW-1:0]  lab_q;
  logic [N-1:0]   rf_q;
  logic [N-1:0]   mu, newmin, acc, acc_n;

  assign r     = IW'(ph >> 1);
  assign act   = mfc_valid && (32'(ph) < 2 * I);
  assign raddr = LAW'(32'(mfc_j) * I + 32'(r));

  // membership of the stored label
  always_comb begin
    if (!lab_q[CW-1]) mu = (lab_q[LW-1:0] == lab1) ? val1 : '0;
    else              mu = (lab_q[LW-1:0] == lab2) ? val2 : '0;
    if (mfc_j == '0)  newmin = mu;
    else              newmin = (rf_q < mu) ? rf_q : mu;
    if (r == '0)      acc_n = newmin;
    else              acc_n = (acc > newmin) ? acc : newmin;
  end

  always_ff @(posedge clk) begin
    if (lab_we) labmem[lab_waddr] <= lab_wdata;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lab_q   <= '0;
      rf_q    <= '0;
      acc     <= '0;
      w       <= '0;
      w_valid <= 1'b0;
      for (int unsigned k = 0; k < I; k++) rf[k] <= '0;
    end else begin
      w_valid <= 1'b0;
      if (act && !ph[0]) begin
        lab_q <= labmem[raddr];
        rf_q  <= rf[r];
      end
      if (act && ph[0]) begin
        rf[r] <= newmin;
        if (32'(mfc_j) == J - 1) begin
          acc <= acc_n;
          if (32'(r) == I - 1) begin
            w       <= acc_n;
            w_valid <= 1'b1;
          end
        end
      end
    end
  end
endmodule
