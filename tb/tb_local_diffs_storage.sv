// tb_local_diffs_storage: writes central differences band after band for
// each column and checks that a read returns the last P values, newest first.
module tb_local_diffs_storage;
  import ccsds_pkg::*;
  localparam int NX = 7;
  logic clk = 0; always #5 clk = ~clk;
  logic rd_en, wr_en;
  logic [XW-1:0] rd_x, wr_x;
  cdiff_vec_t rd_data, wr_prev;
  ldiff_t wr_dc;
  int hist [NX][$];
  int checks = 0, failures = 0;

  local_diffs_storage #(.NX(NX)) dut (.*);

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rd_en = 0; wr_en = 0; rd_x = 0; wr_x = 0; wr_prev = '0; wr_dc = '0;
    for (int x = 0; x < NX; x++) for (int k = 0; k < P_MAX; k++) hist[x].push_front(0);
    // initialise with zeros
    for (int x = 0; x < NX; x++) begin
      @(negedge clk); wr_en = 1; wr_x = XW'(x); wr_prev = '0; wr_dc = '0;
    end
    @(negedge clk); wr_en = 0;
    for (int z = 0; z < 12; z++)
      for (int x = 0; x < NX; x++) begin
        // read, then write back with the new central difference
        @(negedge clk); rd_en = 1; rd_x = XW'(x);
        @(negedge clk); rd_en = 0;
        checks++;
        for (int k = 0; k < P_MAX; k++)
          if (int'(rd_data[k]) != hist[x][k]) begin
            failures++;
            if (failures < 5) $display("x%0d k%0d got %0d exp %0d", x, k, rd_data[k], hist[x][k]);
          end
        wr_en = 1; wr_x = XW'(x); wr_prev = rd_data; wr_dc = ldiff_t'($urandom_range(0, 2000) - 1000);
        hist[x].push_front(int'(wr_dc));
        @(negedge clk); wr_en = 0;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
