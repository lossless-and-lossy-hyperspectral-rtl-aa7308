// tb_config_if: AHB-Lite writes and read-back of every register, start of a
// valid configuration (start pulse, active configuration copied), refusal of
// invalid configurations (error flag, no start), start ignored while busy,
// and the done flag.
module tb_config_if;
  import ccsds_pkg::*;
  logic clk = 0, rst_n = 0; always #5 clk = ~clk;
  logic hsel, hwrite, hready, hreadyout, hresp, core_busy, core_done, start;
  logic [7:0] haddr; logic [1:0] htrans; logic [2:0] hsize; logic [31:0] hwdata, hrdata;
  cfg_t cfg;
  int checks = 0, failures = 0, starts = 0;

  config_if dut (.*);
  always @(posedge clk) if (start) starts++;

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk); hsel = 1; haddr = a; hwrite = 1; htrans = 2'b10;
    @(negedge clk); hsel = 0; htrans = 0; hwrite = 0; hwdata = d;
    @(negedge clk);
  endtask
  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk); hsel = 1; haddr = a; hwrite = 0; htrans = 2'b10;
    @(negedge clk); hsel = 0; htrans = 0; d = hrdata;
  endtask
  task automatic expect_eq(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %0h exp %0h", what, got, exp); end
  endtask

  initial begin
    logic [31:0] d;
    int s0;
    hsel = 0; hwrite = 0; hready = 1; htrans = 0; hsize = 3'b010; haddr = 0; hwdata = 0;
    core_busy = 0; core_done = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    wr(8'h04, 32'd100); wr(8'h08, 32'd200); wr(8'h0C, 32'd50);
    wr(8'h10, 32'h1A); wr(8'h14, {18'd0, 6'd44, 3'd0, 5'd12});
    wr(8'h18, {12'd0, 4'd9, 3'd0, 5'd2, 3'd0, 5'b11100});
    wr(8'h1C, {8'd0, 8'd7, 8'd9, 6'd0, 2'd3});
    wr(8'h20, {20'd0, 4'd1, 4'd2, 1'b0, 3'd2});
    wr(8'h24, {18'd0, 6'd12, 4'd4, 4'd1});
    wr(8'h28, 32'd1234);
    rd(8'h04, d); expect_eq(d, 100, "nx");
    rd(8'h08, d); expect_eq(d, 200, "ny");
    rd(8'h0C, d); expect_eq(d, 50, "nz");
    rd(8'h10, d); expect_eq(d, 32'h12, "pred");
    rd(8'h14, d); expect_eq(d, {18'd0, 6'd44, 3'd0, 5'd12}, "weight");
    rd(8'h18, d); expect_eq(d, {12'd0, 4'd9, 3'd0, 5'd2, 3'd0, 5'b11100}, "rho");
    rd(8'h1C, d); expect_eq(d, {8'd0, 8'd7, 8'd9, 6'd0, 2'd3}, "quant");
    rd(8'h20, d); expect_eq(d, {20'd0, 4'd1, 4'd2, 1'b0, 3'd2}, "srep");
    rd(8'h24, d); expect_eq(d, {18'd0, 6'd12, 4'd4, 4'd1}, "hyb");
    rd(8'h28, d); expect_eq(d, 1234, "accinit");
    // valid start
    s0 = starts;
    wr(8'h00, 1);
    @(negedge clk); @(negedge clk);
    expect_eq(starts - s0, 1, "start pulse");
    expect_eq(32'(cfg.nx), 100, "cfg.nx");
    expect_eq(32'(cfg.p), 2, "cfg.p");
    expect_eq(32'(cfg.ls_mode), 1, "cfg.ls_mode");
    expect_eq({27'd0, $unsigned(cfg.vmin)}, 32'(5'b11100), "cfg.vmin");
    expect_eq(32'(cfg.acc_init), 1234, "cfg.acc_init");
    // registers change during a run do not touch the active configuration
    core_busy = 1;
    wr(8'h04, 32'd7);
    expect_eq(32'(cfg.nx), 100, "cfg stable");
    s0 = starts;
    wr(8'h00, 1);
    expect_eq(starts - s0, 0, "start while busy");
    core_busy = 0;
    @(negedge clk); core_done = 1; @(negedge clk); core_done = 0;
    rd(8'h00, d); expect_eq(d[1], 1, "done flag");
    // invalid: nx = 7 is fine, omega 19 is not
    wr(8'h14, {18'd0, 6'd48, 3'd0, 5'd19});
    s0 = starts;
    wr(8'h00, 1);
    rd(8'h00, d); expect_eq(d[2], 1, "error flag");
    expect_eq(starts - s0, 0, "no start on error");
    // invalid: theta above maximum, then fixed
    wr(8'h14, {18'd0, 6'd48, 3'd0, 5'd13});
    wr(8'h20, {20'd0, 4'd0, 4'd0, 1'b0, 3'd3});
    wr(8'h00, 1);
    rd(8'h00, d); expect_eq(d[2], 1, "theta error");
    wr(8'h20, 0);
    s0 = starts;
    wr(8'h00, 1);
    @(negedge clk);
    rd(8'h00, d); expect_eq(d[2:1], 0, "error and done cleared");
    expect_eq(starts - s0, 1, "restart");
    expect_eq(32'(cfg.nx), 7, "new nx");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
