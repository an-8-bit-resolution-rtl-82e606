// Shift-and-add multiplier (MUL of the membership-function circuit).
//
// Multiplies the N-bit distance x - a_i (b) by the N-bit slope mantissa A_i (a) and gives
// the 2N-bit product.  One partial product is added per clock, LSB of b first: the
// accumulator {high, low} starts as {0, b}; each cycle adds a to the high half when the
// current LSB is 1 and shifts the whole accumulator right by one.  Both operands are
// captured when start is sampled; N clock edges later the product is in p, done is high
// for one cycle, busy falls, and p stays stable until the next start.  The shift-and-add type is the document's; the exact
// sequencing is this design's own.
module fp_mul #(
  parameter int unsigned N = fuzzy_pkg::N_DEF
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic           busy,
  output logic           done,
  output logic [2*N-1:0] p
);
  localparam int unsigned CW = $clog2(N + 1);

  logic [2*N:0]  acc;     // one guard bit for the carry of the addition
  logic [CW-1:0] cnt;
  logic [N-1:0]  ma;      // multiplicand, captured at start
  logic [N:0]    hi_sum;

  assign hi_sum = acc[2*N:N] + (acc[0] ? {1'b0, ma} : '0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc  <= '0;
      ma   <= '0;
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        acc  <= {{(N + 1){1'b0}}, b};
        ma   <= a;
        cnt  <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        acc <= {1'b0, hi_sum, acc[N-1:1]};
        if (cnt == CW'(N - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
        cnt <= cnt + 1'b1;
      end
    end
  end

  assign p = acc[2*N-1:0];
endmodule
