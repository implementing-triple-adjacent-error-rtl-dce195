// olsc_tae_detect - triple adjacent error detection.
//
// Three adjacent data bits d(j), d(j+1), d(j+2) lie in three different
// columns of the m x m data grid, so such an error makes exactly three of the
// column checks c(m+1)..c(2m) one. Up to two random errors can make at most
// two of them one, so "exactly three ones" tells a triple adjacent error from
// the errors standard OS-MLD corrects. Detection looks at the column checks
// only, as the decoder's block diagram shows; the exact-three compare is this
// design's reading of "check if there are three ones".
//
// Interface: syn_m2 (the M column checks), tae (exactly three are one).
// Purely combinational.
module olsc_tae_detect #(
  parameter int unsigned M = 4
) (
  input  logic [M-1:0] syn_m2,
  output logic         tae
);
  always_comb begin
    int unsigned ones;
    ones = 0;
    for (int unsigned c = 0; c < M; c++) ones += 32'(syn_m2[c]);
    tae = (ones == 3);
  end
endmodule
