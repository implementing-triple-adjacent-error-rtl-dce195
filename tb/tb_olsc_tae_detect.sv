// tb_olsc_tae_detect - exhaustive check of the triple adjacent error
// detection for M = 4 and M = 8 (all 2^M column-check patterns): the flag
// must be set exactly when three of the checks are one.
module tb_olsc_tae_detect;
  int checks   = 0;
  int failures = 0;

  logic [3:0] s4;
  logic       t4;
  logic [7:0] s8;
  logic       t8;

  olsc_tae_detect #(.M(4)) dut4 (.syn_m2(s4), .tae(t4));
  olsc_tae_detect #(.M(8)) dut8 (.syn_m2(s8), .tae(t8));

  function automatic int ones_of(input int x);
    int n;
    n = 0;
    while (x != 0) begin
      x = x & (x - 1);
      n++;
    end
    return n;
  endfunction

  initial begin
    for (int x = 0; x < 16; x++) begin
      s4 = 4'(x);
      #1;
      checks++;
      if (t4 !== (ones_of(x) == 3)) begin
        failures++;
        $display("FAIL M=4 syn=%b tae=%b", s4, t4);
      end
    end
    for (int x = 0; x < 256; x++) begin
      s8 = 8'(x);
      #1;
      checks++;
      if (t8 !== (ones_of(x) == 3)) begin
        failures++;
        $display("FAIL M=8 syn=%b tae=%b", s8, t8);
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
