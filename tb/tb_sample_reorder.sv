// tb_sample_reorder: streams several lines of a BIP image with random input
// and output stalls and checks that every sample comes out in BIL order;
// also checks full throughput (one sample per cycle) without stalls, and
// that no sample is taken before a run starts or after its last line.
module tb_sample_reorder;
  import ccsds_pkg::*;
  localparam int NX = 9, NZ = 5;
  logic clk = 0, rst_n = 0; always #5 clk = ~clk;
  logic start, in_valid, in_ready, out_valid, out_ready;
  logic [XW:0] nx; logic [YW:0] ny; logic [ZW:0] nz;
  logic [D-1:0] in_sample, out_sample;
  int checks = 0, failures = 0;

  sample_reorder #(.NX(NX), .NZ(NZ)) dut (.*);

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // sample value encodes its position: y*4096 + z*64 + x
  task automatic run(input int cx, input int cz, input int lines, input int stall, output int cycles);
    int sent, got, total;
    nx = (XW+1)'(cx); nz = (ZW+1)'(cz); ny = (YW+1)'(lines);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    total = cx*cz*lines; sent = 0; got = 0; cycles = 0;
    while (got < total) begin
      int y, x, z;
      in_valid = (sent < total) && ($urandom_range(0, 99) >= stall);
      y = sent / (cx*cz); x = (sent / cz) % cx; z = sent % cz;
      in_sample = D'(y*4096 + z*64 + x);
      out_ready = ($urandom_range(0, 99) >= stall);
      @(posedge clk); cycles++;
      if (out_valid && out_ready) begin
        int ey, ez, ex;
        ey = got / (cx*cz); ez = (got / cx) % cz; ex = got % cx;
        checks++;
        if (int'(out_sample) != ey*4096 + ez*64 + ex) begin
          failures++;
          if (failures < 5) $display("out %0d got %0h", got, out_sample);
        end
        got++;
      end
      if (in_valid && in_ready) sent++;
      @(negedge clk);
    end
  endtask

  // offer a sample while no run is active: it must be refused
  task automatic idle_check();
    for (int i = 0; i < 5; i++) begin
      @(negedge clk);
      in_valid = 1; in_sample = 16'hdead; out_ready = 1;
      @(posedge clk);
      checks++;
      if (in_ready || out_valid) begin
        failures++;
        $display("idle: in_ready %0b out_valid %0b", in_ready, out_valid);
      end
    end
    @(negedge clk); in_valid = 0;
  endtask

  initial begin
    int cyc;
    start = 0; in_valid = 0; out_ready = 0; in_sample = 0; nx = NX; nz = NZ; ny = 1;
    repeat (2) @(posedge clk); rst_n = 1;
    idle_check();
    run(NX, NZ, 4, 30, cyc);
    idle_check();
    run(4, 3, 5, 50, cyc);
    run(NX, NZ, 6, 0, cyc);
    checks++;
    if (cyc > NX*NZ*7 + 4) begin failures++; $display("throughput: %0d cycles", cyc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
