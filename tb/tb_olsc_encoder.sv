// tb_olsc_encoder - checks olsc_encoder for M = 4, 8 and 16 against the
// reference code of tb_olsc_ref_pkg: every one-hot data word (which checks
// each data bit drives, and where it is stored) and 300 random words per size.
// From the one-hot responses it also checks the property one-step majority
// decoding relies on: each data bit drives exactly 2t = 4 checks, and any two
// data bits share at most one check.
// The encoder is combinational; outputs are sampled 1 time unit after the
// input changes.
module tb_olsc_encoder;
  import tb_olsc_ref_pkg::*;

  int checks   = 0;
  int failures = 0;
  int done     = 0;

  for (genvar g = 0; g < 3; g++) begin : g_size
    localparam int unsigned MM = 4 << g;
    localparam int unsigned K  = MM * MM;
    localparam int unsigned N  = K + 4 * MM;

    logic [K-1:0]    data;
    logic [4*MM-1:0] check;
    logic [N-1:0]    cw;

    olsc_encoder #(.M(MM)) dut (.data(data), .check(check), .codeword(cw));

    task automatic apply(input vec_t d);
      vec_t exp_cw, exp_c;
      data = d[K-1:0];
      #1;
      exp_cw = encode(MM, d & mask(K));
      exp_c  = ref_checks(MM, d & mask(K));
      checks++;
      if (cw !== exp_cw[N-1:0] || check !== exp_c[4*MM-1:0]) begin
        failures++;
        if (failures < 10) $display("FAIL M=%0d data=%h cw=%h exp=%h", MM, data, cw, exp_cw[N-1:0]);
      end
    endtask

    logic [4*MM-1:0] col [K];

    initial begin
      vec_t d;
      for (int i = 0; i < int'(K); i++) begin
        d = '0;
        d[i] = 1'b1;
        apply(d);
        col[i] = check;
      end
      for (int i = 0; i < int'(K); i++) begin
        checks++;
        if ($countones(col[i]) != 4) begin
          failures++;
          $display("FAIL M=%0d data bit %0d drives %0d checks", MM, i, $countones(col[i]));
        end
        for (int i2 = i + 1; i2 < int'(K); i2++) begin
          checks++;
          if ($countones(col[i] & col[i2]) > 1) begin
            failures++;
            if (failures < 10) $display("FAIL M=%0d bits %0d and %0d share checks", MM, i, i2);
          end
        end
      end
      for (int r = 0; r < 300; r++) apply(rand_vec());
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
