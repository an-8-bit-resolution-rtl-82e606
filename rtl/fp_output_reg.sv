// Output register: holds the defuzzified result of the last inference.
//
// On load it captures d; q keeps that value until the next load, and q_valid is high for
// the one cycle after each load.  Reset clears both.  The block is named in the document;
// the update flag is this design's own.
module fp_output_reg #(
  parameter int unsigned N = fuzzy_pkg::N_DEF
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [N-1:0] d,
  output logic [N-1:0] q,
  output logic         q_valid
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      q       <= '0;
      q_valid <= 1'b0;
    end else begin
      q_valid <= load;
      if (load) q <= d;
    end
  end
endmodule
