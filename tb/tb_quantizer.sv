// tb_quantizer: random residuals and error limits in every fidelity mode;
// checks q = sgn(d)*floor((|d| + m)/(2m+1)), the error limit m and the
// latency: 1 cycle without division, ceil((D+2)/STEP) + 2 cycles with it.
module tb_quantizer;
  import ccsds_pkg::*;
  localparam int STEP = 2;
  logic clk = 0, rst_n = 0; always #5 clk = ~clk;
  logic start, t_zero, done;
  logic signed [D:0] delta, q;
  logic [D-1:0] s_hat;
  fidelity_e fidelity;
  logic [ERR_BITS-1:0] a_lim, r_lim, m;
  int checks = 0, failures = 0;

  quantizer #(.STEP(STEP)) dut (.*);

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    start = 0; t_zero = 0; delta = 0; s_hat = 0; fidelity = FID_LOSSLESS; a_lim = 0; r_lim = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      int em, eq, mag, lat;
      @(negedge clk);
      fidelity = fidelity_e'($urandom_range(0, 3));
      t_zero = ($urandom_range(0, 15) == 0);
      a_lim = ERR_BITS'($urandom); r_lim = ERR_BITS'($urandom);
      s_hat = D'($urandom);
      delta = (D+1)'($urandom_range(0, 131070) - 65535);
      if (i < 2) delta = (i == 0) ? 17'sd65535 : -17'sd65535;
      case (fidelity)
        FID_ABSOLUTE: em = int'(a_lim);
        FID_RELATIVE: em = (int'(r_lim) * int'(s_hat)) >> D;
        FID_BOTH: begin em = (int'(r_lim) * int'(s_hat)) >> D; if (int'(a_lim) < em) em = int'(a_lim); end
        default: em = 0;
      endcase
      if (t_zero) em = 0;
      mag = (delta < 0) ? -int'(delta) : int'(delta);
      eq = (mag + em) / (2*em + 1);
      if (delta < 0) eq = -eq;
      start = 1;
      @(negedge clk); start = 0;
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      checks++;
      if (int'(q) != eq || int'(m) != em) begin
        failures++;
        if (failures < 5) $display("delta %0d m %0d: got q %0d m %0d exp %0d", delta, em, q, m, eq);
      end
      checks++;
      if (lat != ((em == 0) ? 1 : (D + 2 + STEP - 1) / STEP + 2)) begin
        failures++;
        if (failures < 5) $display("latency %0d (m %0d)", lat, em);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
