// tb_code_combiner: random order tags with high- and low-entropy codewords
// offered at random times and random output stalls; checks that codewords
// come out in tag order with the rescaling bit placed in front.
module tb_code_combiner;
  import ccsds_pkg::*;
  logic clk = 0, rst_n = 0; always #5 clk = ~clk;
  logic tag_valid, tag_ready, hi_valid, hi_ready, lo_valid, lo_ready, out_valid, out_ready, out_last;
  hyb_tag_t tag;
  logic [CW_W-1:0] hi_cw, lo_cw, out_cw;
  logic [CL_W-1:0] hi_len, lo_len, out_len;
  hyb_tag_t tq[$];
  logic [CW_W+CL_W-1:0] hq[$], lq[$], eq[$];
  logic el[$];
  int checks = 0, failures = 0;

  code_combiner dut (.*);

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int n;
    for (int i = 0; i < 400; i++) begin
      hyb_tag_t t; logic [CW_W-1:0] c; logic [CL_W-1:0] l;
      t.high = $urandom_range(0, 1); t.resc = ($urandom_range(0, 3) == 0);
      t.resc_bit = $urandom_range(0, 1); t.last = (i == 399);
      l = CL_W'($urandom_range(0, 32)); c = CW_W'($urandom) & ((CW_W'(1) << l) - 1);
      tq.push_back(t);
      if (t.high) hq.push_back({c, l}); else lq.push_back({c, l});
      if (t.resc) eq.push_back({c | (CW_W'(t.resc_bit) << l), l + 1'b1});
      else eq.push_back({c, l});
      el.push_back(t.last);
    end
    tag_valid = 0; hi_valid = 0; lo_valid = 0; out_ready = 0; tag = '0; hi_cw = 0; hi_len = 0; lo_cw = 0; lo_len = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    n = 0;
    while (n < 400) begin
      @(negedge clk);
      tag_valid = (tq.size() > 0) && ($urandom_range(0, 3) != 0);
      if (tq.size() > 0) tag = tq[0];
      hi_valid = (hq.size() > 0) && ($urandom_range(0, 2) != 0);
      if (hq.size() > 0) {hi_cw, hi_len} = hq[0];
      lo_valid = (lq.size() > 0) && ($urandom_range(0, 2) != 0);
      if (lq.size() > 0) {lo_cw, lo_len} = lq[0];
      out_ready = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (out_valid && out_ready) begin
        checks++;
        if ({out_cw, out_len} != eq[n] || out_last != el[n]) begin
          failures++;
          if (failures < 5) $display("cw %0d: got %0h/%0d", n, out_cw, out_len);
        end
        n++;
      end
      if (tag_valid && tag_ready) void'(tq.pop_front());
      if (hi_valid && hi_ready) void'(hq.pop_front());
      if (lo_valid && lo_ready) void'(lq.pop_front());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
