// olsc_encoder - check-bit generator of the DEC OLS code (k = M*M data bits,
// 4M check bits), and packing of the stored codeword.
//
// Each check bit is the XOR of the M data bits whose row of the parity-check
// matrix H has a one in that check's row (olsc_pkg::chk_idx lists, for each
// data bit, its four checks). The masks are built at elaboration time, so the
// circuit is 4M independent M-input XOR trees. The rows M1 and M2 follow the
// construction of the SEC OLS code; the two Latin-square groups and the
// storage order are this design's choices (see olsc_pkg).
//
// Interface: data[i] is data bit d(i+1); codeword holds data and checks in
// storage order (data bit i at 4M+i, check j at 4M-1-j); check[j] is check
// c(j+1) on its own. Purely combinational, no clock.
module olsc_encoder #(
  parameter int unsigned M = 4
) (
  input  logic [M*M-1:0]     data,
  output logic [4*M-1:0]     check,
  output logic [M*M+4*M-1:0] codeword
);
  localparam int unsigned K = M * M;

  // Data bits that participate in check j.
  function automatic logic [K-1:0] check_mask(input int unsigned j);
    logic [K-1:0] mask;
    mask = '0;
    for (int unsigned i = 0; i < K; i++)
      for (int unsigned g = 0; g < olsc_pkg::GROUPS; g++)
        if (olsc_pkg::chk_idx(M, i, g) == j) mask[i] = 1'b1;
    return mask;
  endfunction

  for (genvar j = 0; j < 4 * M; j++) begin : g_check
    localparam logic [K-1:0] MASK = check_mask(j);
    assign check[j] = ^(data & MASK);
    assign codeword[olsc_pkg::check_pos(M, j)] = check[j];
  end

  for (genvar i = 0; i < K; i++) begin : g_data
    assign codeword[olsc_pkg::data_pos(M, i)] = data[i];
  end

  initial begin
    assert (olsc_pkg::gf_poly(M) != 0)
      else $error("olsc_encoder: M = %0d is not a supported power of two", M);
  end
endmodule
