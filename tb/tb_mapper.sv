// tb_mapper: random quantizer indices, error limits and predicted samples;
// checks the mapped index against the three-case mapping rule with theta
// computed in the testbench, and that distinct q give distinct indices.
module tb_mapper;
  import ccsds_pkg::*;
  logic clk = 0, rst_n = 0; always #5 clk = ~clk;
  logic start, odd, done;
  logic signed [D:0] q;
  logic [ERR_BITS-1:0] m;
  logic [D-1:0] s_hat, delta;
  int checks = 0, failures = 0;

  mapper #(.STEP(2)) dut (.clk, .rst_n, .start, .q, .m, .s_hat, .s_til_odd(odd), .done, .delta);

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic one(input int qi, input int mi, input int sh, input bit o, output int res);
    @(negedge clk);
    q = (D+1)'(qi); m = ERR_BITS'(mi); s_hat = D'(sh); odd = o; start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    res = int'(delta);
  endtask

  initial begin
    start = 0; q = 0; m = 0; s_hat = 0; odd = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      int qi, mi, sh, th, a1, a2, e, om, got, qa;
      bit o;
      mi = ($urandom_range(0, 2) == 0) ? 0 : $urandom_range(1, 255);
      sh = $urandom_range(0, 65535);
      if (i % 7 == 0) sh = $urandom_range(0, 3);
      if (i % 7 == 1) sh = 65535 - $urandom_range(0, 3);
      o = $urandom_range(0, 1);
      a1 = (sh + mi) / (2*mi + 1); a2 = (65535 - sh + mi) / (2*mi + 1);
      th = (a1 < a2) ? a1 : a2;
      qi = $urandom_range(0, 2*th + 4) - th - 2;
      if (i % 5 == 0) qi = $urandom_range(0, 2*a2) - a1;
      if (qi < -a1) qi = -a1;
      if (qi > a2) qi = a2;
      one(qi, mi, sh, o, got);
      qa = (qi < 0) ? -qi : qi;
      om = o ? -qi : qi;
      if (qa > th) e = qa + th;
      else if (om >= 0 && om <= th) e = 2*qa;
      else e = 2*qa - 1;
      checks++;
      if (got != e) begin
        failures++;
        if (failures < 5) $display("q %0d m %0d shat %0d: got %0d exp %0d", qi, mi, sh, got, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
