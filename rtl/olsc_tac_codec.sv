// olsc_tac_codec - write and read paths of a memory protected by a DEC
// Orthogonal Latin Squares code with triple adjacent error correction.
//
// The write path encodes a K = M*M bit data word into a K + 4M bit codeword
// (olsc_encoder); the read path takes a codeword back from the memory array
// and returns the data with any two random errors, or any burst of three
// adjacent errors, corrected (olsc_tac_decoder). The memory array itself sits
// outside, between wr_codeword and rd_codeword.
//
// Default M = 4 (16 data bits, 16 check bits, 32-bit codeword); M = 8 and
// M = 16 give 64- and 256-bit data words. Both paths are combinational.
module olsc_tac_codec #(
  parameter int unsigned M = 4
) (
  input  logic [M*M-1:0]     wr_data,
  output logic [M*M+4*M-1:0] wr_codeword,
  input  logic [M*M+4*M-1:0] rd_codeword,
  output logic [M*M-1:0]     rd_data,
  output logic               rd_error_detected,
  output logic               rd_tae
);

  olsc_encoder #(.M(M)) u_encoder (
    .data     (wr_data),
    .check    (),
    .codeword (wr_codeword)
  );

  olsc_tac_decoder #(.M(M)) u_decoder (
    .codeword       (rd_codeword),
    .data_out       (rd_data),
    .error_detected (rd_error_detected),
    .tae            (rd_tae)
  );
endmodule
