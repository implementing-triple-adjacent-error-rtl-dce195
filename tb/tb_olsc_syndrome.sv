// tb_olsc_syndrome - checks olsc_syndrome for M = 4, 8 and 16: a clean
// codeword gives an all-zero syndrome, and codewords with 1, 2, 3 random
// errors or a random error vector give the syndrome of the reference model.
module tb_olsc_syndrome;
  import tb_olsc_ref_pkg::*;

  int checks   = 0;
  int failures = 0;
  int done     = 0;

  for (genvar g = 0; g < 3; g++) begin : g_size
    localparam int unsigned MM = 4 << g;
    localparam int unsigned K  = MM * MM;
    localparam int unsigned N  = K + 4 * MM;

    logic [N-1:0]    cw;
    logic [4*MM-1:0] syn;

    olsc_syndrome #(.M(MM)) dut (.codeword(cw), .syn(syn));

    initial begin
      vec_t w, e, s;
      for (int r = 0; r < 400; r++) begin
        w = encode(MM, rand_vec() & mask(K));
        e = '0;
        case (r % 5)
          0: ;
          1: e[int'($urandom % N)] = 1'b1;
          2: begin e[int'($urandom % N)] = 1'b1; e[int'($urandom % N)] ^= 1'b1; end
          3: e[int'($urandom % (N - 2)) +: 3] = 3'b111;
          default: e = rand_vec() & mask(N);
        endcase
        w = w ^ e;
        cw = w[N-1:0];
        #1;
        s = syndrome(MM, w);
        checks++;
        if (syn !== s[4*MM-1:0] || (e == '0 && syn != '0)) begin
          failures++;
          if (failures < 10) $display("FAIL M=%0d cw=%h syn=%h exp=%h", MM, cw, syn, s[4*MM-1:0]);
        end
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
