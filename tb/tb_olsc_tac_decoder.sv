// tb_olsc_tac_decoder - exhaustive check of the modified decoder for M = 4,
// 8 and 16. Every single error, every double error and every burst of three
// adjacent errors anywhere in the codeword is applied to a random codeword;
// the data must come back unchanged, error_detected must be set for every
// non-zero error, and tae must be set exactly when three column checks of the
// reference syndrome are one. Syndromes of error patterns are built from the
// reference model's per-position syndrome columns.
module tb_olsc_tac_decoder;
  import tb_olsc_ref_pkg::*;

  int checks   = 0;
  int failures = 0;
  int done     = 0;
  int tae_used = 0;

  for (genvar g = 0; g < 3; g++) begin : g_size
    localparam int unsigned MM = 4 << g;
    localparam int unsigned K  = MM * MM;
    localparam int unsigned N  = K + 4 * MM;

    logic [N-1:0] cw;
    logic [K-1:0] data_out;
    logic         err_det, tae;
    vec_t         col [N];

    olsc_tac_decoder #(.M(MM)) dut (
      .codeword(cw), .data_out(data_out), .error_detected(err_det), .tae(tae)
    );

    task automatic try_err(input vec_t d, input vec_t w, input vec_t e, input vec_t s);
      bit exp_tae;
      int m2;
      m2 = 0;
      for (int c = 0; c < int'(MM); c++) m2 += int'(s[MM + c]);
      exp_tae = (m2 == 3);
      cw = w[N-1:0] ^ e[N-1:0];
      #1;
      checks++;
      if (data_out !== d[K-1:0] || err_det !== (e != '0) || tae !== exp_tae) begin
        failures++;
        if (failures < 10)
          $display("FAIL M=%0d err=%h out=%h exp=%h det=%b tae=%b/%b", MM, e[N-1:0],
                   data_out, d[K-1:0], err_det, tae, exp_tae);
      end
      if (tae) tae_used++;
    endtask

    initial begin
      vec_t d, w, e, s;
      for (int p = 0; p < int'(N); p++) begin
        e = '0; e[p] = 1'b1;
        col[p] = syndrome(MM, e);
      end
      d = rand_vec() & mask(K);
      w = encode(MM, d);
      try_err(d, w, '0, '0);
      for (int p = 0; p < int'(N); p++) begin
        d = rand_vec() & mask(K);
        w = encode(MM, d);
        e = '0; e[p] = 1'b1;
        try_err(d, w, e, col[p]);
        for (int q = p + 1; q < int'(N); q++) begin
          e = '0; e[p] = 1'b1; e[q] = 1'b1;
          try_err(d, w, e, col[p] ^ col[q]);
        end
        if (p + 2 < int'(N)) begin
          e = '0; e[p +: 3] = 3'b111;
          try_err(d, w, e, col[p] ^ col[p+1] ^ col[p+2]);
        end
      end
      done++;
    end
  end

  initial begin
    wait (done == 3);
    if (tae_used == 0) begin
      failures++;
      $display("FAIL triple adjacent path never selected");
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
