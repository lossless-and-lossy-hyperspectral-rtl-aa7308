// tb_hiec: random statistics and mapped indices; checks k, the reversed
// Golomb power-of-two codeword, the escape codeword at the unary limit and
// the uncoded first sample.
module tb_hiec;
  import ccsds_pkg::*;
  logic first;
  logic [D-1:0] delta;
  logic [CNTW-1:0] cnt;
  logic [ACCW-1:0] acc;
  logic [5:0] umax;
  logic [4:0] k;
  logic [CW_W-1:0] cw;
  logic [CL_W-1:0] len;
  int checks = 0, failures = 0, nesc = 0;

  hiec dut (.*);

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      longint c, a, u, ecw; int ek, elen;
      first = ($urandom_range(0, 20) == 0);
      c = $urandom_range(1, 15); cnt = CNTW'(c);
      a = c * $urandom_range(19, 1 << 17); acc = ACCW'(a);
      umax = 6'($urandom_range(8, 16));
      delta = D'($urandom_range(0, 1 << $urandom_range(0, 16)));
      #1;
      ek = 0;
      for (int kk = 0; kk <= D - 2; kk++) if ((c << (kk + 2)) <= a + ((49 * c) >> 5)) ek = kk;
      u = longint'(delta) >> ek;
      if (first) begin ecw = longint'(delta); elen = D; end
      else if (u < longint'(umax)) begin
        ecw = ((longint'(delta) & ((1 << ek) - 1)) << (u + 1)) | (longint'(1) << u);
        elen = ek + int'(u) + 1;
      end else begin ecw = longint'(delta) << umax; elen = D + int'(umax); nesc++; end
      checks++;
      if ((!first && int'(k) != ek) || cw != CW_W'(ecw) || int'(len) != elen) begin
        failures++;
        if (failures < 5) $display("delta %0d k %0d/%0d len %0d/%0d", delta, k, ek, len, elen);
      end
    end
    checks++;
    if (nesc == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
