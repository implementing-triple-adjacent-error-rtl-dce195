// tb_olsc_majority - exhaustive check of the majority circuit for t = 2
// (4 votes, threshold 3) and t = 3 (6 votes, threshold 4).
module tb_olsc_majority;
  int checks   = 0;
  int failures = 0;

  logic [3:0] v2;
  logic       f2;
  logic [5:0] v3;
  logic       f3;

  olsc_majority #(.T(2)) dut2 (.votes(v2), .flip(f2));
  olsc_majority #(.T(3)) dut3 (.votes(v3), .flip(f3));

  initial begin
    int ones;
    for (int x = 0; x < 16; x++) begin
      v2 = 4'(x);
      #1;
      ones = (x & 1) + ((x >> 1) & 1) + ((x >> 2) & 1) + ((x >> 3) & 1);
      checks++;
      if (f2 !== (ones > 2)) begin
        failures++;
        $display("FAIL t=2 votes=%b flip=%b", v2, f2);
      end
    end
    for (int x = 0; x < 64; x++) begin
      v3 = 6'(x);
      #1;
      ones = 0;
      for (int b = 0; b < 6; b++) ones += (x >> b) & 1;
      checks++;
      if (f3 !== (ones > 3)) begin
        failures++;
        $display("FAIL t=3 votes=%b flip=%b", v3, f3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
