// olsc_majority - majority circuit of one-step majority logic decoding.
//
// A data bit of a t-error-correcting OLS code is checked by 2t parity
// equations, and any other single bit error disturbs at most one of them. The
// bit is declared in error when at least t+1 of its 2t recomputed checks are
// one: with at most t errors an erroneous bit sees at least t+1 ones and a
// correct bit at most t. The threshold t+1 follows the decoding rule; the
// popcount-and-compare form is this design's.
//
// Interface: votes (the 2T recomputed checks of the bit), flip (majority).
// Purely combinational.
module olsc_majority #(
  parameter int unsigned T = 2
) (
  input  logic [2*T-1:0] votes,
  output logic           flip
);
  always_comb begin
    int unsigned ones;
    ones = 0;
    for (int unsigned v = 0; v < 2 * T; v++) ones += 32'(votes[v]);
    flip = (ones >= T + 1);
  end
endmodule
