// olsc_syndrome - recomputes the 4M parity-check equations of a DEC OLS
// codeword read from memory.
//
// The data part of the codeword is re-encoded with olsc_encoder and each
// recomputed check is XORed with the stored check bit, so syn[j] is one when
// equation j of the parity-check matrix is violated. syn[0..M-1] are the row
// checks (M1), syn[M..2M-1] the column checks (M2) used by the triple adjacent
// error detection, syn[2M..4M-1] the two Latin-square groups.
//
// Interface: codeword in storage order (see olsc_pkg), syn out. Purely
// combinational.
module olsc_syndrome #(
  parameter int unsigned M = 4
) (
  input  logic [M*M+4*M-1:0] codeword,
  output logic [4*M-1:0]     syn
);
  localparam int unsigned K = M * M;

  logic [K-1:0]     data;
  logic [4*M-1:0]   stored;
  logic [4*M-1:0]   recomputed;
  logic [K+4*M-1:0] unused_cw;

  for (genvar i = 0; i < K; i++) begin : g_data
    assign data[i] = codeword[olsc_pkg::data_pos(M, i)];
  end
  for (genvar j = 0; j < 4 * M; j++) begin : g_check
    assign stored[j] = codeword[olsc_pkg::check_pos(M, j)];
  end

  olsc_encoder #(.M(M)) u_reencode (
    .data     (data),
    .check    (recomputed),
    .codeword (unused_cw)
  );

  assign syn = recomputed ^ stored;
endmodule
