// tb_olsc_tae_corrector - checks the triple adjacent correction for M = 4,
// 8 and 16. Every triple adjacent error in the data bits (within a row and
// across a row boundary) must be undone. Bursts of three adjacent check bits,
// and a data triple with one of its four checks masked off, must leave the
// data untouched. A clean word must pass unchanged.
module tb_olsc_tae_corrector;
  import tb_olsc_ref_pkg::*;

  int checks   = 0;
  int failures = 0;
  int done     = 0;

  for (genvar g = 0; g < 3; g++) begin : g_size
    localparam int unsigned MM = 4 << g;
    localparam int unsigned K  = MM * MM;

    logic [K-1:0]    data, data_out;
    logic [4*MM-1:0] syn;

    olsc_tae_corrector #(.M(MM)) dut (.data(data), .syn(syn), .data_out(data_out));

    task automatic try_err(input vec_t e, input bit drop_one, input bit expect_fix);
      vec_t d, w, s, exp_d;
      d = rand_vec() & mask(K);
      w = encode(MM, d) ^ e;
      s = syndrome(MM, w);
      if (drop_one) begin
        // clear one of the set row/column checks: no triple gate may fire
        int ones[$];
        for (int j = 0; j < 2 * int'(MM); j++) if (s[j]) ones.push_back(j);
        s[ones[$urandom_range(ones.size() - 1)]] = 1'b0;
      end
      data = data_of(MM, w);
      syn  = s[4*MM-1:0];
      #1;
      exp_d = expect_fix ? d : data_of(MM, w);
      checks++;
      if (data_out !== exp_d[K-1:0]) begin
        failures++;
        if (failures < 10) $display("FAIL M=%0d syn=%h out=%h exp=%h", MM, syn, data_out, exp_d[K-1:0]);
      end
    endtask

    initial begin
      vec_t e;
      try_err('0, 1'b0, 1'b1);
      for (int j = 0; j < int'(K) - 2; j++) begin
        e = '0;
        for (int b = 0; b < 3; b++) e[pos_data(MM, j + b)] = 1'b1;
        try_err(e, 1'b0, 1'b1);
        try_err(e, 1'b1, 1'b0);
      end
      for (int p = 0; p < 4 * int'(MM) - 2; p++) begin
        e = '0;
        e[p +: 3] = 3'b111;
        try_err(e, 1'b0, 1'b0);
      end
      done++;
    end
  end

  initial begin
    wait (done == 3);
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
