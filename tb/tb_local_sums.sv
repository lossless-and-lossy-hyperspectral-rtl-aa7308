// tb_local_sums: random neighbours and positions in all four local sum modes,
// compared with the local sum definitions written out case by case.
module tb_local_sums;
  import ccsds_pkg::*;
  ls_mode_e mode;
  logic xf, xl, yf, zf;
  logic [D-1:0] w, nw, n, ne, wz1;
  logic [LSW-1:0] sigma;
  int checks = 0, failures = 0;

  local_sums dut (.mode, .x_first(xf), .x_last(xl), .y_first(yf), .z_first(zf),
                  .s_w(w), .s_nw(nw), .s_n(n), .s_ne(ne), .s_wz1(wz1), .sigma);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      int e;
      mode = ls_mode_e'($urandom_range(0, 3));
      xf = ($urandom_range(0, 3) == 0); xl = !xf && ($urandom_range(0, 3) == 0);
      yf = ($urandom_range(0, 3) == 0); zf = ($urandom_range(0, 1) == 0);
      w = D'($urandom); nw = D'($urandom); n = D'($urandom); ne = D'($urandom); wz1 = D'($urandom);
      if (i < 4) begin w = '1; nw = '1; n = '1; ne = '1; wz1 = '1; xf = 0; xl = 0; yf = 0; end
      #1;
      if (xf && yf) e = 0;
      else case (mode)
        LS_WIDE_NEIGHBOUR:   e = yf ? 4*w : xf ? 2*(n+ne) : xl ? w+nw+2*n : w+nw+n+ne;
        LS_NARROW_NEIGHBOUR: e = yf ? (zf ? 4*32768 : 4*wz1) : xf ? 2*(n+ne) : xl ? 2*(nw+n) : nw+2*n+ne;
        LS_WIDE_COLUMN:      e = yf ? 4*w : 4*n;
        default:             e = yf ? (zf ? 4*32768 : 4*wz1) : 4*n;
      endcase
      checks++;
      if (int'(sigma) != e) begin
        failures++;
        if (failures < 5) $display("mode %0d got %0d exp %0d", mode, sigma, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
