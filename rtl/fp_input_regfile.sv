// Input register file: holds the J crisp inputs of one inference.
//
// A host writes input j through a synchronous write port; the slot controller reads the
// input of the current slot through an asynchronous read port and hands it to both
// membership-function circuits (their register RE1).  All registers reset to zero.
// The block and its place in the datapath follow the document; the port shape is this
// design's own.
module fp_input_regfile #(
  parameter int unsigned N  = fuzzy_pkg::N_DEF,
  parameter int unsigned J  = fuzzy_pkg::J_DEF,
  parameter int unsigned JW = fuzzy_pkg::clog2_min1(J)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [JW-1:0] waddr,
  input  logic [N-1:0]  wdata,
  input  logic [JW-1:0] raddr,
  output logic [N-1:0]  rdata
);
  logic [N-1:0] regs [J];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned j = 0; j < J; j++) regs[j] <= '0;
    end else if (we && (32'(waddr) < J)) begin
      regs[waddr] <= wdata;
    end
  end

  assign rdata = (32'(raddr) < J) ? regs[raddr] : '0;
endmodule
