// tb_olsc_tac_codec - end-to-end test of the protected-memory write and read
// paths, at the default size (M = 4, no parameter override) and at M = 8 and
// M = 16 (64- and 256-bit words). For each size a word is encoded by the
// write path, a behavioural memory word stores it, an error pattern is
// flipped into the stored cells, and the read path must return the original
// data. All single errors, all double errors and all bursts of three adjacent
// cells are applied, each to a fresh random word. The run counts how often
// each mechanism occurs and fails if one never does: clean read, OS-MLD
// correction of one and of two errors, triple adjacent correction of data
// bits (inside a row and across a row boundary), bursts straddling the
// data/check boundary, bursts in the check bits that select the triple
// adjacent path without touching data, and error detection.
module tb_olsc_tac_codec;
  import tb_olsc_ref_pkg::*;

  int checks   = 0;
  int failures = 0;
  int done     = 0;

  // mechanism counters, summed over the sizes
  int n_clean = 0, n_mld1 = 0, n_mld2 = 0, n_tae_row = 0, n_tae_cross = 0;
  int n_boundary = 0, n_tae_chk = 0, n_det = 0;

  task automatic check_read(input int m, input vec_t exp_d, input vec_t got_d,
                            input bit exp_det, input bit got_det, input vec_t err);
    checks++;
    if (got_d !== exp_d || got_det !== exp_det) begin
      failures++;
      if (failures < 10)
        $display("FAIL M=%0d err=%h data=%h exp=%h det=%b", m, err, got_d, exp_d, got_det);
    end
  endtask

  // Default-size instance: no parameter list.
  logic [15:0] wd0, rd0;
  logic [31:0] wc0, rc0;
  logic        det0, tae0;
  olsc_tac_codec dut0 (
    .wr_data(wd0), .wr_codeword(wc0), .rd_codeword(rc0),
    .rd_data(rd0), .rd_error_detected(det0), .rd_tae(tae0)
  );

  for (genvar g = 0; g < 3; g++) begin : g_size
    localparam int unsigned MM = 4 << g;
    localparam int unsigned K  = MM * MM;
    localparam int unsigned N  = K + 4 * MM;

    logic [K-1:0] wd, rd;
    logic [N-1:0] wc, rc;
    logic         det, tae;
    logic [N-1:0] mem_word;   // behavioural memory cell array, one word

    if (g == 0) begin : g_use_default
      assign wd0 = wd;
      assign rc0 = rc;
      assign wc  = wc0;
      assign rd  = rd0;
      assign det = det0;
      assign tae = tae0;
    end else begin : g_param
      olsc_tac_codec #(.M(MM)) dut (
        .wr_data(wd), .wr_codeword(wc), .rd_codeword(rc),
        .rd_data(rd), .rd_error_detected(det), .rd_tae(tae)
      );
    end

    task automatic cycle(input vec_t e);
      vec_t d, got;
      int   dbits, cbits, first, last;
      d  = rand_vec() & mask(K);
      wd = d[K-1:0];
      #1;
      mem_word = wc;                       // write
      mem_word = mem_word ^ e[N-1:0];      // upset
      rc = mem_word;                       // read
      #1;
      got = '0;
      got[K-1:0] = rd;
      check_read(MM, d, got, e != '0, det, e);
      // classify the pattern
      dbits = 0; cbits = 0; first = -1; last = -1;
      for (int p = 0; p < int'(N); p++)
        if (e[p]) begin
          if (p >= 4 * int'(MM)) dbits++; else cbits++;
          if (first < 0) first = p;
          last = p;
        end
      if (e == '0) n_clean++;
      if (det) n_det++;
      if (!tae && dbits == 1 && cbits == 0) n_mld1++;
      if (!tae && dbits == 2 && cbits == 0) n_mld2++;
      if (tae && dbits == 3) begin
        if ((first - 4 * int'(MM)) / int'(MM) == (last - 4 * int'(MM)) / int'(MM)) n_tae_row++;
        else n_tae_cross++;
      end
      if (dbits > 0 && cbits > 0 && last - first == 2) n_boundary++;
      if (tae && cbits == 3) n_tae_chk++;
    endtask

    initial begin
      vec_t e;
      rc = '0;
      cycle('0);
      for (int p = 0; p < int'(N); p++) begin
        e = '0; e[p] = 1'b1;
        cycle(e);
        for (int q = p + 1; q < int'(N); q++) begin
          e = '0; e[p] = 1'b1; e[q] = 1'b1;
          cycle(e);
        end
        if (p + 2 < int'(N)) begin
          e = '0; e[p +: 3] = 3'b111;
          cycle(e);
        end
      end
      done++;
    end
  end

  initial begin
    wait (done == 3);
    $display("clean=%0d mld_single=%0d mld_double=%0d tae_in_row=%0d tae_cross_row=%0d",
             n_clean, n_mld1, n_mld2, n_tae_row, n_tae_cross);
    $display("boundary_bursts=%0d tae_in_checks=%0d detected=%0d", n_boundary, n_tae_chk, n_det);
    if (n_clean == 0 || n_mld1 == 0 || n_mld2 == 0 || n_tae_row == 0 || n_tae_cross == 0 ||
        n_boundary == 0 || n_tae_chk == 0 || n_det == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
