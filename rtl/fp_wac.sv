// Weighted-average circuit (WAC): singleton defuzzifier.
//
// Computes  y = floor( sum_k w_k * S_k / sum_k w_k )  over the K matching scores w_k,
// where S_k are the N-bit singleton positions held in a small singleton memory.
// After start it steps sel = 0..K-1 through the score multiplexer, one score per cycle,
// accumulating the numerator (w * S) and the denominator (w).  A restoring divider then
// forms the N quotient bits MSB first, one per cycle; the quotient always fits in N bits
// because it is a weighted mean of N-bit values.  If every score is 0 the result is 0.
// done pulses for one cycle with y valid; y holds until the next result.  done is high
// K + N + 2 clock edges after the edge that samples start.
//
// Weighted-average defuzzification with singletons follows the document; the sequential
// MAC, the divider, truncation and the zero rule are this design's own.
module fp_wac #(
  parameter int unsigned N  = fuzzy_pkg::N_DEF,
  parameter int unsigned K  = fuzzy_pkg::K_DEF,
  parameter int unsigned KW = fuzzy_pkg::clog2_min1(K)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic [KW-1:0] sel,
  input  logic [N-1:0]  w_in,
  input  logic          sing_we,
  input  logic [KW-1:0] sing_waddr,
  input  logic [N-1:0]  sing_wdata,
  output logic          busy,
  output logic          done,
  output logic [N-1:0]  y
);
  localparam int unsigned GW = $clog2(K + 1);  // growth of a K-term sum
  localparam int unsigned DW = N + GW;         // denominator width
  localparam int unsigned NW = 2 * N + GW;     // numerator width
  localparam int unsigned CW = $clog2(N + 1);

  typedef enum logic [1:0] {IDLE, ACC, DIV, FIN} state_t;
  state_t state;

  logic [N-1:0]  sing [K];
  logic [NW-1:0] num;
  logic [DW-1:0] den;
  logic [DW-1:0] rem;          // partial remainder, always below den
  logic [DW:0]   rem_sh;
  logic [N-1:0]  q;
  logic [CW-1:0] bitc;
  logic          ge;

  always_ff @(posedge clk) begin
    if (sing_we && (32'(sing_waddr) < K)) sing[sing_waddr] <= sing_wdata;
  end

  // one restoring-division step: bring down the next numerator bit (bitc = 1..N)
  assign rem_sh = {rem, num[N - 32'(bitc)]};
  assign ge     = (rem_sh >= {1'b0, den});

  assign busy = (state != IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= IDLE;
      sel   <= '0;
      num   <= '0;
      den   <= '0;
      rem   <= '0;
      q     <= '0;
      bitc  <= '0;
      done  <= 1'b0;
      y     <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          state <= ACC;
          sel   <= '0;
          num   <= '0;
          den   <= '0;
        end
        ACC: begin
          num <= num + NW'(w_in * sing[sel]);
          den <= den + DW'(w_in);
          if (32'(sel) == K - 1) state <= DIV;
          else                   sel   <= sel + 1'b1;
          rem  <= '0;
          bitc <= '0;
        end
        DIV: begin
          if (bitc == '0) begin
            // the upper part of the numerator is below den since the quotient fits N bits
            rem <= num[NW-1:N];
            bitc <= bitc + 1'b1;
          end else begin
            rem  <= DW'(ge ? rem_sh - {1'b0, den} : rem_sh);
            q    <= {q[N-2:0], ge};
            if (32'(bitc) == N) state <= FIN;
            bitc <= bitc + 1'b1;
          end
        end
        FIN: begin
          state <= IDLE;
          done  <= 1'b1;
          y     <= (den == '0) ? '0 : q;
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
