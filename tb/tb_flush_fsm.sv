// tb_flush_fsm: forwards a run of codewords, then checks the tail: the
// low-entropy flush codewords, one accumulator per band in 2 + D + gstar
// bits read from a model of the statistics unit, and the final '1' flagged
// as the end, all under random output stalls.
module tb_flush_fsm;
  import ccsds_pkg::*;
  localparam int NZ = 5;
  logic clk = 0, rst_n = 0; always #5 clk = ~clk;
  logic [ZW:0] nz; logic [3:0] gstar;
  logic in_valid, in_ready, in_last, lo_flush_req, lo_fl_valid, lo_fl_ready, lo_flush_done;
  logic acc_rd_en, out_valid, out_ready, out_end, tail_active;
  logic [CW_W-1:0] in_cw, lo_fl_cw, out_cw;
  logic [CL_W-1:0] in_len, lo_fl_len, out_len;
  logic [ZW-1:0] acc_rd_z;
  logic [ACCW-1:0] acc_rd_data;
  logic [ACCW-1:0] accs [NZ];
  logic [CW_W+CL_W:0] exp_q[$];
  int checks = 0, failures = 0;

  flush_fsm dut (.*);

  always @(posedge clk) if (acc_rd_en) acc_rd_data <= accs[acc_rd_z];

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int sent, nfl, n;
    bit fin;
    nz = NZ; gstar = 4;
    for (int z = 0; z < NZ; z++) accs[z] = ACCW'($urandom);
    for (int i = 0; i < 30; i++) exp_q.push_back({CW_W'(i * 3 + 1), CL_W'(i % 20 + 1), 1'b0});
    for (int i = 0; i < 2; i++) exp_q.push_back({CW_W'(5 + i), CL_W'(3), 1'b0});
    for (int z = 0; z < NZ; z++) exp_q.push_back({CW_W'(accs[z]), CL_W'(2 + D + 4), 1'b0});
    exp_q.push_back({CW_W'(1), CL_W'(1), 1'b1});
    in_valid = 0; in_last = 0; in_cw = 0; in_len = 0; lo_fl_valid = 0; lo_flush_done = 0;
    lo_fl_cw = 0; lo_fl_len = 0; out_ready = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    sent = 0; nfl = 0; n = 0; fin = 0;
    while (!fin) begin
      @(negedge clk);
      in_valid = (sent < 30) && ($urandom_range(0, 2) != 0);
      in_cw = CW_W'(sent * 3 + 1); in_len = CL_W'(sent % 20 + 1); in_last = (sent == 29);
      lo_fl_valid = lo_flush_req && (nfl < 2) && ($urandom_range(0, 1) == 1);
      lo_fl_cw = CW_W'(5 + nfl); lo_fl_len = 3;
      lo_flush_done = lo_flush_req && (nfl == 2);
      out_ready = ($urandom_range(0, 2) != 0);
      @(posedge clk);
      if (in_valid && in_ready) sent++;
      if (lo_fl_valid && lo_fl_ready) nfl++;
      if (out_valid && out_ready) begin
        checks++;
        if ({out_cw, out_len, out_end} != exp_q[n]) begin
          failures++;
          if (failures < 5) $display("out %0d: %0h/%0d/%0d", n, out_cw, out_len, out_end);
        end
        n++;
        if (out_end) fin = 1;
      end
    end
    checks++;
    if (n != exp_q.size()) begin failures++; $display("%0d outputs", n); end
    repeat (2) @(negedge clk);
    checks++;
    if (tail_active) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
