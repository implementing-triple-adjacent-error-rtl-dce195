// olsc_tae_corrector - triple adjacent error correction of the data bits of
// a DEC OLS code.
//
// A triple adjacent error on data bits j, j+1, j+2 sets the three column
// checks of those bits and exactly one row check: the row that holds an odd
// number of the three (olsc_pkg::tae_row). That set of four checks differs
// for every j. One four-input AND per triple (K-2 of them) fires when its four
// recomputed checks are all one, and drives XOR correction gates on its three
// bits; for M = 4 and j = 0 these are checks c1, c5, c6, c7 and bits d1, d2,
// d3. A bit covered by several triples is flipped when any of them fires.
// The generalisation from the first triple to all K-2 triples, including
// triples that cross a row boundary, is derived from the parity-check matrix.
//
// Interface: data, syn (4M recomputed checks), data_out. The output is only
// meaningful when olsc_tae_detect flags a triple adjacent error; the decoder
// selects it in that case. Purely combinational.
module olsc_tae_corrector #(
  parameter int unsigned M = 4
) (
  input  logic [M*M-1:0] data,
  input  logic [4*M-1:0] syn,
  output logic [M*M-1:0] data_out
);
  localparam int unsigned K = M * M;

  logic [K-3:0] fire;
  logic [K-1:0] flip;

  for (genvar j = 0; j < K - 2; j++) begin : g_triple
    localparam int unsigned ROW = olsc_pkg::tae_row(M, j);
    localparam int unsigned C0  = M + (j % M);
    localparam int unsigned C1  = M + ((j + 1) % M);
    localparam int unsigned C2  = M + ((j + 2) % M);
    assign fire[j] = syn[ROW] & syn[C0] & syn[C1] & syn[C2];
  end

  always_comb begin
    flip = '0;
    for (int unsigned j = 0; j < K - 2; j++)
      if (fire[j]) flip[j +: 3] = 3'b111;
  end

  assign data_out = data ^ flip;
endmodule
