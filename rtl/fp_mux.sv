// Score multiplexer (MUX between the operational elements and the weighted-average circuit).
//
// Combinational K:1 selector: passes the matching score of operational element sel to the
// weighted-average circuit, which steps sel through 0..K-1.  An index of K or more gives 0.
// The block is named in the document; the selector form is this design's own.
module fp_mux #(
  parameter int unsigned N  = fuzzy_pkg::N_DEF,
  parameter int unsigned K  = fuzzy_pkg::K_DEF,
  parameter int unsigned KW = fuzzy_pkg::clog2_min1(K)
) (
  input  logic [N-1:0]  din [K],
  input  logic [KW-1:0] sel,
  output logic [N-1:0]  dout
);
  always_comb begin
    dout = '0;
    for (int unsigned k = 0; k < K; k++) begin
      if (32'(sel) == k) dout = din[k];
    end
  end
endmodule
