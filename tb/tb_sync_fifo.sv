// tb_sync_fifo: random pushes and pops against a queue model; checks data
// order, full/empty flags, the count and simultaneous push and pop.
module tb_sync_fifo;
  localparam int W = 12, DEP = 5;
  logic clk = 0, rst_n = 0; always #5 clk = ~clk;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [W-1:0] in_data, out_data;
  logic [$clog2(DEP):0] count;
  logic [W-1:0] model[$];
  int checks = 0, failures = 0, fulls = 0;

  sync_fifo #(.WIDTH(W), .DEPTH(DEP)) dut (.*);

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    in_valid = 0; out_ready = 0; in_data = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 99) < ((i / 500) % 2 ? 70 : 30));
      out_ready = ($urandom_range(0, 99) < ((i / 500) % 2 ? 30 : 70));
      in_data = W'($urandom);
      #1;
      checks++;
      if (count != ($clog2(DEP)+1)'(model.size()) || in_ready != (model.size() < DEP) ||
          out_valid != (model.size() > 0) || (out_valid && out_data != model[0])) begin
        failures++;
        if (failures < 5) $display("cycle %0d count %0d model %0d", i, count, model.size());
      end
      if (model.size() == DEP) fulls++;
      @(posedge clk);
      if (out_valid && out_ready) void'(model.pop_front());
      if (in_valid && in_ready) model.push_back(in_data);
    end
    checks++;
    if (fulls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
