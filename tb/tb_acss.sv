// tb_acss: a BIL stream of random mapped indices over several bands with
// random output stalls; checks counter, accumulator, rescaling flag and
// dropped bit of every sample against a per-band model of the statistics
// update, the final accumulators through the flush read port, and one
// sample per cycle within a band.
module tb_acss;
  import ccsds_pkg::*;
  localparam int NZ = 4, NX = 20, NY = 3;
  logic clk = 0, rst_n = 0; always #5 clk = ~clk;
  logic [3:0] gamma0, gstar;
  logic [ACCW-1:0] acc_init, out_acc, fl_rd_acc;
  logic in_valid, in_ready, out_valid, out_ready, out_resc, out_resc_bit, fl_rd_en;
  mapped_t in_data, out_data;
  logic [CNTW-1:0] out_cnt;
  logic [ZW-1:0] fl_rd_z;
  longint acc[NZ], cnt[NZ];
  int checks = 0, failures = 0, nresc = 0;

  acss #(.NZ(NZ)) dut (.*);

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  mapped_t stim[$];
  initial begin
    int got;
    gamma0 = 1; gstar = 4; acc_init = 40; in_valid = 0; out_ready = 0; fl_rd_en = 0; fl_rd_z = 0;
    in_data = '0;
    for (int y = 0; y < NY; y++)
      for (int z = 0; z < NZ; z++)
        for (int x = 0; x < NX; x++) begin
          mapped_t m;
          m.delta = D'($urandom_range(0, (z == 3) ? 4000 : 30));
          m.z = ZW'(z); m.first = (x == 0 && y == 0); m.last = 0;
          stim.push_back(m);
        end
    repeat (2) @(posedge clk); rst_n = 1;
    got = 0;
    fork
      for (int i = 0; i < stim.size(); i++) begin
        @(negedge clk); in_valid = 1; in_data = stim[i];
        @(posedge clk); while (!in_ready) @(posedge clk);
        @(negedge clk); in_valid = 0;
      end
      while (got < stim.size()) begin
        @(negedge clk); out_ready = ($urandom_range(0, 2) != 0);
        @(posedge clk);
        if (out_valid && out_ready) begin
          longint sum, d, ea, ec; bit er, eb; int z;
          d = longint'(out_data.delta); z = int'(out_data.z);
          er = 0; eb = 0;
          if (out_data.first) begin acc[z] = 40; cnt[z] = 2; end
          else begin
            sum = acc[z] + 4*d;
            if (cnt[z] < 15) begin acc[z] = sum; cnt[z]++; end
            else begin er = 1; eb = sum[0]; acc[z] = (sum + 1) / 2; cnt[z] = (cnt[z] + 1) / 2; end
          end
          checks++;
          if (out_data != stim[got] || longint'(out_acc) != acc[z] || longint'(out_cnt) != cnt[z] ||
              out_resc != er || (er && out_resc_bit != eb)) begin
            failures++;
            if (failures < 5) $display("sample %0d: acc %0d/%0d cnt %0d/%0d", got, out_acc, acc[z], out_cnt, cnt[z]);
          end
          if (er) nresc++;
          got++;
        end
      end
    join
    for (int z = 0; z < NZ; z++) begin
      @(negedge clk); fl_rd_en = 1; fl_rd_z = ZW'(z);
      @(negedge clk); fl_rd_en = 0;
      checks++;
      if (longint'(fl_rd_acc) != acc[z]) failures++;
    end
    checks++;
    if (nresc == 0) failures++;
    // throughput: 40 back-to-back samples of band 2 without stalls take
    // 40 cycles plus two for fetching the band's statistics
    begin
      int acc_n, cyc;
      out_ready = 1; acc_n = 0; cyc = 0;
      @(negedge clk);
      in_valid = 1;
      while (acc_n < 40) begin
        in_data = '0; in_data.z = ZW'(2); in_data.delta = D'(acc_n);
        @(posedge clk); cyc++;
        if (in_ready) acc_n++;
        @(negedge clk);
      end
      in_valid = 0;
      checks++;
      if (cyc != 42) begin failures++; $display("throughput: %0d cycles for 40 samples", cyc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
