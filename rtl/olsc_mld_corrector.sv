// olsc_mld_corrector - standard one-step majority logic (OS-MLD) correction
// of the K = M*M data bits of a DEC OLS code.
//
// For every data bit the four recomputed checks it participates in (one per
// check group, olsc_pkg::chk_idx) feed an olsc_majority; when three or more
// are one the bit is flipped by its XOR correction gate. This corrects any
// pattern of up to two errors anywhere in the codeword.
//
// Interface: data (read data bits), syn (4M recomputed checks), data_out
// (corrected data). Purely combinational.
module olsc_mld_corrector #(
  parameter int unsigned M = 4
) (
  input  logic [M*M-1:0] data,
  input  logic [4*M-1:0] syn,
  output logic [M*M-1:0] data_out
);
  localparam int unsigned K = M * M;

  for (genvar i = 0; i < K; i++) begin : g_bit
    logic [olsc_pkg::GROUPS-1:0] votes;
    logic                        flip;
    for (genvar g = 0; g < olsc_pkg::GROUPS; g++) begin : g_vote
      assign votes[g] = syn[olsc_pkg::chk_idx(M, i, g)];
    end
    olsc_majority #(.T(olsc_pkg::T)) u_maj (
      .votes (votes),
      .flip  (flip)
    );
    assign data_out[i] = data[i] ^ flip;
  end
endmodule
