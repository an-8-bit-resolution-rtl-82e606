// Shifter with overflow saturation (SFT of the membership-function circuit).
//
// Loads the 2N-bit product and shifts it toward the LSB one bit per clock, filling zeros
// at the MSB, until it has been shifted shamt (= B_i) times.  The result is then the
// product times 2^-B_i.  Overflow is the OR of its upper N bits: on overflow the output is
// all ones (full-bit F), otherwise the lower N bits.  dout and ovf are valid whenever busy
// is low; a shift by B takes B cycles after start.  The shift, zero fill and OR-based
// saturation follow the document; one bit per cycle is this design's reading.
module fp_shifter #(
  parameter int unsigned N  = fuzzy_pkg::N_DEF,
  parameter int unsigned BW = $clog2(N)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [2*N-1:0] din,
  input  logic [BW-1:0]  shamt,
  output logic           busy,
  output logic           ovf,
  output logic [N-1:0]   dout
);
  logic [2*N-1:0] sr;
  logic [BW-1:0]  left;

  assign busy = (left != '0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sr   <= '0;
      left <= '0;
    end else if (start) begin
      sr   <= din;
      left <= shamt;
    end else if (busy) begin
      sr   <= {1'b0, sr[2*N-1:1]};
      left <= left - 1'b1;
    end
  end

  assign ovf  = |sr[2*N-1:N];
  assign dout = ovf ? '1 : sr[N-1:0];
endmodule
