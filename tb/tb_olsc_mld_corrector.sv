// tb_olsc_mld_corrector - checks standard OS-MLD correction for M = 4 and 8:
// every single and every double error anywhere in the codeword (data or check
// bits) must give back the original data. The syndrome is taken from the
// reference model, so this tests the corrector on its own.
module tb_olsc_mld_corrector;
  import tb_olsc_ref_pkg::*;

  int checks   = 0;
  int failures = 0;
  int done     = 0;

  for (genvar g = 0; g < 2; g++) begin : g_size
    localparam int unsigned MM = 4 << g;
    localparam int unsigned K  = MM * MM;
    localparam int unsigned N  = K + 4 * MM;

    logic [K-1:0]    data, data_out;
    logic [4*MM-1:0] syn;

    olsc_mld_corrector #(.M(MM)) dut (.data(data), .syn(syn), .data_out(data_out));

    task automatic try_err(input vec_t e);
      vec_t d, w, s;
      d = rand_vec() & mask(K);
      w = encode(MM, d) ^ e;
      s = syndrome(MM, w);
      data = data_of(MM, w);
      syn  = s[4*MM-1:0];
      #1;
      checks++;
      if (data_out !== d[K-1:0]) begin
        failures++;
        if (failures < 10) $display("FAIL M=%0d err=%h out=%h exp=%h", MM, e[N-1:0], data_out, d[K-1:0]);
      end
    endtask

    initial begin
      vec_t e;
      try_err('0);
      for (int p = 0; p < int'(N); p++) begin
        e = '0; e[p] = 1'b1;
        try_err(e);
        for (int q = p + 1; q < int'(N); q++) begin
          e = '0; e[p] = 1'b1; e[q] = 1'b1;
          try_err(e);
        end
      end
      done++;
    end
  end

  initial begin
    wait (done == 2);
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
