// tb_rho_update: sweeps t, Nx, the exponent limits and tinc, comparing rho
// with clip(vmin + floor((t - Nx)/2^tinc), vmin, vmax) + D - omega.
module tb_rho_update;
  import ccsds_pkg::*;
  logic [TW-1:0] t;
  logic [XW:0] nx;
  logic signed [4:0] vmin, vmax;
  logic [3:0] tinc;
  logic [4:0] omega;
  logic signed [6:0] rho;
  int checks = 0, failures = 0;

  rho_update dut (.*);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      int a, b, e, q, dt;
      a = $urandom_range(0, 15) - 6; b = $urandom_range(0, 15) - 6;
      if (a > b) begin int tmp; tmp = a; a = b; b = tmp; end
      vmin = 5'(a); vmax = 5'(b);
      tinc = 4'($urandom_range(4, 11));
      omega = 5'($urandom_range(4, 13));
      nx = (XW+1)'($urandom_range(2, NX_MAX));
      t = TW'($urandom_range(0, 40000));
      #1;
      dt = int'(t) - int'(nx);
      q = (dt >= 0) ? dt >> tinc : -((-dt + (1 << tinc) - 1) >> tinc);
      e = a + q; if (e < a) e = a; if (e > b) e = b;
      e = e + D - int'(omega);
      checks++;
      if (int'(rho) != e) begin
        failures++;
        if (failures < 5) $display("t=%0d nx=%0d got %0d exp %0d", t, nx, rho, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
