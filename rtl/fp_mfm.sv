// Membership-function memory (MFM) of one group.
//
// For every input j and edge i of the group it holds one word {a, A, B}: the turning point
// a_i where edge i begins, and the slope alpha_i = A_i * 2^-B_i as an N-bit mantissa A_i
// and a log2(N)-bit shift B_i.  Even edges rise, odd edges fall.  The word is addressed by
// {j, i}; write is synchronous, read is asynchronous (the membership-function circuit
// registers the word it reads).  The word content follows the document; the {j, i}
// addressing and the word layout are this design's own.
module fp_mfm #(
  parameter int unsigned N  = fuzzy_pkg::N_DEF,
  parameter int unsigned M  = fuzzy_pkg::M_DEF,
  parameter int unsigned J  = fuzzy_pkg::J_DEF,
  parameter int unsigned BW = $clog2(N),
  parameter int unsigned MW = fuzzy_pkg::clog2_min1(M),
  parameter int unsigned JW = fuzzy_pkg::clog2_min1(J),
  parameter int unsigned AW = JW + MW,
  parameter int unsigned DW = 2 * N + BW
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,   // {j, i}
  input  logic [DW-1:0] wdata,   // {a, A, B}
  input  logic [AW-1:0] raddr,   // {j, i}
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];
endmodule
