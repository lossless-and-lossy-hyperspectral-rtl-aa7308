// tb_neighbour_storage: random writes and reads against a shadow array;
// checks the one-cycle read latency and the z*NX + x placement.
module tb_neighbour_storage;
  import ccsds_pkg::*;
  localparam int NX = 10, NZ = 5;
  logic clk = 0; always #5 clk = ~clk;
  logic rd_en, wr_en;
  logic [ZW-1:0] rd_z, wr_z;
  logic [XW-1:0] rd_x, wr_x;
  logic [D-1:0] rd_data, wr_data;
  int shadow [NZ][NX];
  int checks = 0, failures = 0;

  neighbour_storage #(.NX(NX), .NZ(NZ)) dut (.*);

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rd_en = 0; wr_en = 0; rd_z = 0; rd_x = 0; wr_z = 0; wr_x = 0; wr_data = 0;
    for (int z = 0; z < NZ; z++)
      for (int x = 0; x < NX; x++) begin
        @(negedge clk); wr_en = 1; wr_z = ZW'(z); wr_x = XW'(x); wr_data = D'($urandom);
        shadow[z][x] = int'(wr_data);
      end
    @(negedge clk); wr_en = 0;
    for (int i = 0; i < 2000; i++) begin
      int ez, ex;
      @(negedge clk);
      ez = $urandom_range(0, NZ-1); ex = $urandom_range(0, NX-1);
      rd_en = 1; rd_z = ZW'(ez); rd_x = XW'(ex);
      wr_en = ($urandom_range(0, 1) == 1);
      wr_z = ZW'($urandom_range(0, NZ-1)); wr_x = XW'($urandom_range(0, NX-1));
      wr_data = D'($urandom);
      @(posedge clk); #1;
      checks++;
      if (int'(rd_data) != shadow[ez][ex] && !(wr_en && wr_z == ZW'(ez) && wr_x == XW'(ex))) begin
        failures++;
        if (failures < 5) $display("read z%0d x%0d got %0d exp %0d", ez, ex, rd_data, shadow[ez][ex]);
      end
      if (wr_en) shadow[wr_z][wr_x] = int'(wr_data);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
