// tb_sample_representative: random quantizer indices, error limits and
// representative parameters; checks bin centre, representative and
// prediction error against the equations, and that phi = psi = 0 returns the
// bin centre.
module tb_sample_representative;
  import ccsds_pkg::*;
  import ccsds_ref_pkg::*;
  logic t_zero;
  logic [D-1:0] s, s_hat, s_bin, s_rep;
  logic signed [D:0] q;
  logic [ERR_BITS-1:0] m;
  logic [D+1:0] s_til;
  logic signed [63:0] s_chk;
  logic [4:0] omega;
  logic [2:0] theta;
  logic [3:0] phi, psi;
  logic signed [D+2:0] err;
  int checks = 0, failures = 0;

  sample_representative dut (.*);

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      longint sb, sg, num, dr, sr, hi;
      int om, th;
      t_zero = ($urandom_range(0, 15) == 0);
      om = $urandom_range(4, 13); omega = 5'(om);
      th = $urandom_range(0, 2); theta = 3'(th);
      phi = 4'($urandom_range(0, (1 << th) - 1)); psi = 4'($urandom_range(0, (1 << th) - 1));
      if (i % 4 == 0) begin phi = 0; psi = 0; end
      s = D'($urandom); s_hat = D'($urandom); m = ERR_BITS'($urandom);
      q = (D+1)'($urandom_range(0, 600) - 300);
      s_til = {1'b0, s_hat, 1'($urandom_range(0, 1))};
      hi = longint'(s_til) * p2(om) + longint'($urandom_range(0, (1 << om) - 1));
      s_chk = hi;
      #1;
      sb = clip(longint'(s_hat) + longint'(q) * (2*longint'(m) + 1), 0, 65535);
      if (t_zero) sb = longint'(s);
      sg = (q > 0) ? 1 : (q < 0) ? -1 : 0;
      num = 4*(p2(th) - longint'(phi)) * (sb*p2(om) - sg*longint'(m)*longint'(psi)*p2(om - th))
            + longint'(phi)*hi - longint'(phi)*p2(om+1);
      dr = fdiv(num, p2(om + th + 1));
      sr = t_zero ? longint'(s) : fdiv(dr + 1, 2);
      checks++;
      if (longint'(s_bin) != sb || longint'(s_rep) != sr || longint'(err) != 2*sb - longint'(s_til)) begin
        failures++;
        if (failures < 5) $display("got %0d %0d %0d exp %0d %0d", s_bin, s_rep, err, sb, sr);
      end
      if (phi == 0 && psi == 0) begin
        checks++;
        if (s_rep != s_bin) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
