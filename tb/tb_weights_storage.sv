// tb_weights_storage: checks the default initial weights for several omega,
// P and band values, and that written vectors read back per band.
module tb_weights_storage;
  import ccsds_pkg::*;
  localparam int NZ = 6;
  logic clk = 0; always #5 clk = ~clk;
  logic [4:0] omega;
  logic [1:0] p;
  logic rd_en, wr_en, init;
  logic [ZW-1:0] rd_z, wr_z;
  wvec_t rd_data, wr_data, shadow [NZ];
  int checks = 0, failures = 0;

  weights_storage #(.NZ(NZ)) dut (.*);

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rd_en = 0; wr_en = 0; init = 0; rd_z = 0; wr_z = 0; wr_data = '0; omega = 13; p = 3;
    for (int i = 0; i < 60; i++) begin
      int om, pp, zz, w1;
      om = $urandom_range(4, 13); pp = $urandom_range(0, 3); zz = $urandom_range(0, NZ-1);
      @(negedge clk); omega = 5'(om); p = 2'(pp); wr_en = 1; init = 1; wr_z = ZW'(zz);
      @(negedge clk); wr_en = 0; init = 0; rd_en = 1; rd_z = ZW'(zz);
      @(negedge clk); rd_en = 0;
      w1 = (7 << om) / 8;
      checks++;
      for (int k = 0; k < C_MAX; k++) begin
        int e;
        e = 0;
        if (k >= 3 && k - 3 < pp && k - 3 < zz) e = w1 >> (3 * (k - 3));
        if (int'(rd_data[k]) != e) begin
          failures++;
          if (failures < 5) $display("om %0d p %0d z %0d k %0d got %0d exp %0d", om, pp, zz, k, rd_data[k], e);
        end
      end
    end
    for (int z = 0; z < NZ; z++) begin
      @(negedge clk); wr_en = 1; wr_z = ZW'(z);
      for (int k = 0; k < C_MAX; k++) wr_data[k] = weight_t'($urandom);
      shadow[z] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    for (int z = NZ-1; z >= 0; z--) begin
      @(negedge clk); rd_en = 1; rd_z = ZW'(z);
      @(negedge clk); rd_en = 0;
      checks++;
      if (rd_data != shadow[z]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
