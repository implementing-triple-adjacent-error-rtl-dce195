// olsc_tac_decoder - modified decoder of a double error correction (DEC)
// Orthogonal Latin Squares code that also corrects bursts of three adjacent
// errors, with no check bits beyond the 4M of the DEC code.
//
// The 4M parity checks are recomputed (olsc_syndrome). Three things then run
// in parallel: standard OS-MLD correction (olsc_mld_corrector), triple
// adjacent correction (olsc_tae_corrector) and triple adjacent detection
// (olsc_tae_detect, exactly three ones among the column checks). The
// detection output selects which of the two corrected words is delivered;
// running all three side by side keeps the detection off the critical path,
// at the cost of power. error_detected is the OR of all checks; a memory can
// use it to skip the slower correction when the word is clean. Check bits are
// not corrected, only the K data bits.
//
// Interface: codeword (storage order, see olsc_pkg) in; data_out,
// error_detected, tae (the triple adjacent correction was selected) out.
// Purely combinational, no clock or reset.
module olsc_tac_decoder #(
  parameter int unsigned M = 4
) (
  input  logic [M*M+4*M-1:0] codeword,
  output logic [M*M-1:0]     data_out,
  output logic               error_detected,
  output logic               tae
);
  localparam int unsigned K = M * M;

  logic [K-1:0]   data;
  logic [4*M-1:0] syn;
  logic [K-1:0]   mld_data;
  logic [K-1:0]   tae_data;

  for (genvar i = 0; i < K; i++) begin : g_data
    assign data[i] = codeword[olsc_pkg::data_pos(M, i)];
  end

  olsc_syndrome #(.M(M)) u_syndrome (
    .codeword (codeword),
    .syn      (syn)
  );

  olsc_mld_corrector #(.M(M)) u_mld (
    .data     (data),
    .syn      (syn),
    .data_out (mld_data)
  );

  olsc_tae_corrector #(.M(M)) u_tae_corr (
    .data     (data),
    .syn      (syn),
    .data_out (tae_data)
  );

  olsc_tae_detect #(.M(M)) u_tae_detect (
    .syn_m2 (syn[2*M-1:M]),
    .tae    (tae)
  );

  assign data_out       = tae ? tae_data : mld_data;
  assign error_detected = |syn;
endmodule
