// tb_entropy_decision: random counters and accumulators around the code
// selection thresholds; checks the high/low decision and the code index.
module tb_entropy_decision;
  import ccsds_pkg::*;
  logic first, high;
  logic [CNTW-1:0] cnt;
  logic [ACCW-1:0] acc;
  logic [3:0] code_idx;
  int checks = 0, failures = 0, nh = 0, nl = 0;
  longint T[16] = '{303336, 225404, 166979, 128672, 95597, 69670, 50678, 34898,
                    23331, 14935, 9282, 5510, 3195, 1928, 1112, 408};

  entropy_decision dut (.*);

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      longint a, c; bit eh; int ei;
      first = ($urandom_range(0, 20) == 0);
      c = $urandom_range(1, 15);
      a = (c * T[$urandom_range(0, 15)]) >> 14;
      a = a + $urandom_range(0, 4) - 2;
      if (i % 3 == 0) a = $urandom_range(0, 2000);
      if (a < 0) a = 0;
      cnt = CNTW'(c); acc = ACCW'(a);
      #1;
      eh = first || (a * 16384 >= T[0] * c);
      ei = 0;
      for (int k = 0; k < 16; k++) if (a * 16384 < T[k] * c) ei = k;
      checks++;
      if (high != eh || (!eh && int'(code_idx) != ei)) begin
        failures++;
        if (failures < 5) $display("acc %0d cnt %0d: got %0d %0d exp %0d %0d", a, c, high, code_idx, eh, ei);
      end
      if (eh) nh++; else nl++;
    end
    checks++;
    if (nh == 0 || nl == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
