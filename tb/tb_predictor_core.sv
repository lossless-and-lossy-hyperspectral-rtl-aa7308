// tb_predictor_core: random local differences, weights, local sums and
// configurations; checks the predicted samples and the updated weights
// against the prediction and weight update equations evaluated with 64-bit
// integers in the testbench.
module tb_predictor_core;
  import ccsds_pkg::*;
  import ccsds_ref_pkg::*;
  logic t_zero, full;
  logic [ZW-1:0] z;
  logic [1:0] p;
  logic [4:0] omega;
  logic [5:0] r;
  logic [LSW-1:0] sigma;
  uvec_t u;
  wvec_t w, w_next;
  logic [D-1:0] s_prev_band, s_hat;
  logic [D+1:0] s_til;
  logic signed [63:0] s_chk;
  logic signed [D+2:0] err;
  logic signed [6:0] rho;
  int checks = 0, failures = 0;

  predictor_core dut (.*);

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      longint dh, v, m, hi, til, smid, smax, wlim;
      int om, pst;
      t_zero = ($urandom_range(0, 15) == 0);
      full = $urandom_range(0, 1); p = 2'($urandom_range(0, 3)); z = ZW'($urandom_range(0, 5));
      om = $urandom_range(4, 13); omega = 5'(om);
      r = 6'($urandom_range(32, 48));
      if (i % 5 == 0) r = 6'(D + om + 2);
      sigma = LSW'($urandom);
      for (int k = 0; k < C_MAX; k++) begin
        u[k] = ldiff_t'($urandom_range(0, 1 << 19) - (1 << 18));
        w[k] = weight_t'($urandom_range(0, 1 << (om + 3)) - (1 << (om + 2)));
      end
      s_prev_band = D'($urandom);
      err = (D+3)'($urandom_range(0, 1 << 18) - (1 << 17));
      rho = 7'($urandom_range(0, 30) - 8);
      #1;
      smid = 32768; smax = 65535;
      pst = (int'(z) < int'(p)) ? int'(z) : int'(p);
      dh = 0;
      for (int k = 0; k < C_MAX; k++)
        if ((k < 3 && full) || (k >= 3 && k - 3 < pst)) dh += longint'(w[k]) * longint'(u[k]);
      v = dh + p2(om) * (longint'(sigma) - 4*smid);
      m = v + p2(int'(r) - 1);
      m = m - fdiv(m, p2(int'(r))) * p2(int'(r)) - p2(int'(r) - 1);
      hi = clip(m + p2(om+2)*smid + p2(om+1), 0, p2(om+2)*smax + p2(om+1));
      if (!t_zero) til = fdiv(hi, p2(om+1));
      else if (p > 0 && z > 0) til = 2*longint'(s_prev_band);
      else til = 2*smid;
      checks++;
      if (longint'(s_til) != til || longint'(s_hat) != fdiv(til, 2) || s_chk != hi) begin
        failures++;
        if (failures < 5) $display("pred got %0d exp %0d", s_til, til);
      end
      wlim = p2(om + 2);
      checks++;
      for (int k = 0; k < C_MAX; k++) begin
        longint a, d, nw;
        if ((k < 3 && full) || (k >= 3 && k - 3 < pst)) begin
          a = (err >= 0) ? longint'(u[k]) : -longint'(u[k]);
          if (rho >= 0) d = fdiv(a + p2(int'(rho)), p2(int'(rho) + 1));
          else d = fdiv(a * p2(-int'(rho)) + 1, 2);
          nw = clip(longint'(w[k]) + d, -wlim, wlim - 1);
        end else nw = longint'(w[k]);
        if (longint'(w_next[k]) != nw) begin
          failures++;
          if (failures < 5) $display("w[%0d] got %0d exp %0d", k, w_next[k], nw);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
