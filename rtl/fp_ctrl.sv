// Slot controller: timing and input sequencing of the processor.
//
// A free-running phase counter ph counts 0..S-1; every pipeline stage of the processor
// advances at ph == S-1, so a slot of S cycles is the unit of work.  A start request
// (held pending if a run is in progress) begins a run at the next slot: for J slots
// feed_valid is high and feed_j = 0..J-1 selects the input that both membership-function
// circuits sample at the end of the slot.  A request that arrives during a run starts the
// next run in the slot right after the last input, so back-to-back inferences take J*S
// cycles each.  busy is high while a run is active or a request is pending.
//
// One input per slot and the slot of max(M,N)+1 cycles follow the document's stage timing
// and throughput; the document gives no controller, so this sequencer is this design's own.
module fp_ctrl #(
  parameter int unsigned J  = fuzzy_pkg::J_DEF,
  parameter int unsigned S  = fuzzy_pkg::slot_len(fuzzy_pkg::M_DEF, fuzzy_pkg::N_DEF),
  parameter int unsigned JW = fuzzy_pkg::clog2_min1(J),
  parameter int unsigned PW = $clog2(S)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic [PW-1:0] ph,
  output logic          feed_valid,
  output logic [JW-1:0] feed_j,
  output logic          busy
);
  logic adv, pend, req;

  assign adv        = (ph == PW'(S - 1));
  assign req        = pend || start;
  assign busy       = feed_valid || pend;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ph         <= '0;
      pend       <= 1'b0;
      feed_valid <= 1'b0;
      feed_j     <= '0;
    end else begin
      ph <= adv ? '0 : ph + 1'b1;
      if (adv) begin
        if (feed_valid && (32'(feed_j) != J - 1)) begin
          feed_j <= feed_j + 1'b1;
          pend   <= pend || start;
        end else begin
          feed_valid <= req;
          feed_j     <= '0;
          pend       <= 1'b0;
        end
      end else if (start) begin
        pend <= 1'b1;
      end
    end
  end
endmodule
