// tb_olsc_tac_codec_full - complete run of olsc_tac_codec at its default size
// (M = 4: 16 data bits, 16 check bits, 32-cell codeword), with no parameter
// override. Every data word is written through the encoder into a
// behavioural memory word, upset, and read back through the decoder. Error
// patterns: none, all 32 single errors, all 496 double errors and all 30
// bursts of three adjacent cells, each applied to 20 random data words,
// plus the all-zero and all-one words. The read data must equal the written
// data, rd_error_detected must flag every non-zero pattern, and rd_tae must
// be set exactly for bursts that touch three column checks. Each mechanism
// must occur at least once.
module tb_olsc_tac_codec_full;
  import tb_olsc_ref_pkg::*;

  localparam int M = 4;
  localparam int K = M * M;
  localparam int N = K + 4 * M;

  int checks   = 0;
  int failures = 0;
  int n_clean = 0, n_mld = 0, n_tae_data = 0, n_tae_chk = 0, n_det = 0;

  logic [K-1:0] wr_data, rd_data;
  logic [N-1:0] wr_codeword, rd_codeword;
  logic         rd_error_detected, rd_tae;
  logic [N-1:0] mem_word;

  olsc_tac_codec dut (
    .wr_data(wr_data), .wr_codeword(wr_codeword), .rd_codeword(rd_codeword),
    .rd_data(rd_data), .rd_error_detected(rd_error_detected), .rd_tae(rd_tae)
  );

  task automatic cycle(input logic [K-1:0] d, input logic [N-1:0] e);
    vec_t s, ev;
    int   col_ones, dbits;
    wr_data = d;
    #1;
    mem_word    = wr_codeword ^ e;
    rd_codeword = mem_word;
    #1;
    ev = '0;
    ev[N-1:0] = e;
    s = syndrome(M, encode(M, {'0, d}) ^ ev);
    col_ones = 0;
    for (int c = 0; c < M; c++) col_ones += int'(s[M + c]);
    dbits = $countones(e[N-1:4*M]);
    checks++;
    if (rd_data !== d || rd_error_detected !== (e != '0) || rd_tae !== (col_ones == 3)) begin
      failures++;
      if (failures < 10)
        $display("FAIL data=%h err=%h rd=%h det=%b tae=%b", d, e, rd_data, rd_error_detected, rd_tae);
    end
    if (e == '0) n_clean++;
    if (rd_error_detected) n_det++;
    if (!rd_tae && dbits > 0) n_mld++;
    if (rd_tae && dbits == 3) n_tae_data++;
    if (rd_tae && dbits == 0) n_tae_chk++;
  endtask

  initial begin
    logic [N-1:0] e;
    rd_codeword = '0;
    cycle('0, '0);
    cycle('1, '0);
    for (int r = 0; r < 20; r++) begin
      for (int p = 0; p < N; p++) begin
        e = '0; e[p] = 1'b1;
        cycle(K'($urandom), e);
        for (int q = p + 1; q < N; q++) begin
          e = '0; e[p] = 1'b1; e[q] = 1'b1;
          cycle(K'($urandom), e);
        end
        if (p + 2 < N) begin
          e = '0; e[p +: 3] = 3'b111;
          cycle(K'($urandom), e);
        end
      end
    end
    $display("clean=%0d mld_corrections=%0d tae_data=%0d tae_checks_only=%0d detected=%0d",
             n_clean, n_mld, n_tae_data, n_tae_chk, n_det);
    if (n_clean == 0 || n_mld == 0 || n_tae_data == 0 || n_tae_chk == 0 || n_det == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
