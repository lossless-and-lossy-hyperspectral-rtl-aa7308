// tb_local_diffs: random neighbours and local sums; the directional and
// central local differences are compared with 4*neighbour - sigma and the
// edge rules.
module tb_local_diffs;
  import ccsds_pkg::*;
  logic xf, yf;
  logic [LSW-1:0] sigma;
  logic [D-1:0] w, nw, n, rep;
  ldiff_t dn, dw, dnw, dc;
  int checks = 0, failures = 0;

  local_diffs dut (.x_first(xf), .y_first(yf), .sigma, .s_w(w), .s_nw(nw), .s_n(n),
                   .s_rep(rep), .d_n(dn), .d_w(dw), .d_nw(dnw), .d_c(dc));

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      int en, ew, enw, ec, sg;
      xf = ($urandom_range(0, 3) == 0); yf = ($urandom_range(0, 3) == 0);
      w = D'($urandom); nw = D'($urandom); n = D'($urandom); rep = D'($urandom);
      sigma = LSW'($urandom);
      #1;
      sg = int'(sigma);
      en  = yf ? 0 : 4*n - sg;
      ew  = yf ? 0 : xf ? 4*n - sg : 4*w - sg;
      enw = yf ? 0 : xf ? 4*n - sg : 4*nw - sg;
      ec  = (xf && yf) ? 0 : 4*rep - sg;
      checks++;
      if (int'(dn) != en || int'(dw) != ew || int'(dnw) != enw || int'(dc) != ec) begin
        failures++;
        if (failures < 5) $display("got %0d %0d %0d %0d exp %0d %0d %0d %0d", dn, dw, dnw, dc, en, ew, enw, ec);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
