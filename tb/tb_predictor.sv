// tb_predictor: checks the prediction block against the behavioural
// reference for several configurations (lossless and near-lossless, all four
// local sum modes, full and reduced prediction, absolute/relative error
// limits, sample representative damping and offset), with random stalls on
// the output. Also checks the 11-cycle serial schedule in lossless mode.
module tb_predictor;
  import ccsds_pkg::*;
  import ccsds_ref_pkg::*;
  import img_gen_pkg::*;

  localparam int NXT = 8, NZT = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  cfg_t    cfg;
  logic    start, busy, done, in_valid, in_ready, out_valid, out_ready;
  logic [D-1:0] in_sample;
  mapped_t out_data;
  int checks = 0, failures = 0;

  predictor #(.NX(NXT), .NZ(NZT), .STEP(2)) dut (
    .clk, .rst_n, .cfg, .start, .busy, .done, .in_valid, .in_ready, .in_sample,
    .out_valid, .out_ready, .out_data);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input cfg_t c, input int noise, input int stall, input bit check_rate);
    int s[], mref[], nq, nx, ny, nz, n, got, cyc, first_cyc;
    nx = int'(c.nx); ny = int'(c.ny); nz = int'(c.nz);
    make_image(nx, ny, nz, noise, 3, s);
    predict(c, s, mref, nq);
    cfg = c;
    @(posedge clk); start <= 1'b1; @(posedge clk); start <= 1'b0;
    n = 0; got = 0; cyc = 0; first_cyc = -1;
    in_sample <= D'(s[0]); in_valid <= 1'b1;
    while (got < nx*ny*nz) begin
      out_ready <= ($urandom_range(0, 99) >= stall);
      @(posedge clk);
      cyc++;
      if (in_valid && in_ready) begin
        n++;
        if (n < nx*ny*nz) in_sample <= D'(s[n]); else in_valid <= 1'b0;
      end
      if (out_valid && out_ready) begin
        int idx, z, y;
        idx = got;
        z = (idx / nx) % nz;
        y = idx / (nx*nz);
        checks++;
        if (int'(out_data.delta) != mref[idx] || int'(out_data.z) != z ||
            out_data.first != (y == 0 && idx % nx == 0) || out_data.last != (idx == nx*ny*nz - 1)) begin
          failures++;
          if (failures < 10) $display("mismatch sample %0d: got %0d exp %0d", idx, out_data.delta, mref[idx]);
        end
        if (got == 0) first_cyc = cyc;
        got++;
      end
    end
    if (check_rate) begin
      checks++;
      if (cyc - first_cyc != 11 * (nx*ny*nz - 1)) begin
        failures++;
        $display("rate: %0d cycles for %0d samples", cyc - first_cyc, nx*ny*nz - 1);
      end
    end
    @(posedge clk);
    checks++;
    if (busy) begin failures++; $display("still busy"); end
    $display("config done: quantized samples %0d", nq);
  endtask

  initial begin
    cfg_t c;
    start = 0; in_valid = 0; out_ready = 1; in_sample = '0;
    cfg = base_cfg(NXT, 4, NZT);
    repeat (3) @(posedge clk);
    rst_n = 1;
    // lossless, wide neighbour, full, 3 bands
    c = base_cfg(NXT, 4, NZT);
    run(c, 40, 0, 1'b1);
    // lossless, narrow neighbour, reduced, 2 bands, stalls
    c = base_cfg(NXT, 4, NZT); c.ls_mode = LS_NARROW_NEIGHBOUR; c.full = 0; c.p = 2;
    run(c, 300, 30, 1'b0);
    // near-lossless absolute, wide column, representative damping/offset
    c = base_cfg(NXT, 5, NZT); c.ls_mode = LS_WIDE_COLUMN; c.fidelity = FID_ABSOLUTE;
    c.a_lim = 8'd5; c.theta = 3'd2; c.phi = 4'd1; c.psi = 4'd3; c.omega = 5'd10; c.r = 6'd40;
    run(c, 200, 20, 1'b0);
    // near-lossless relative, narrow column, register wrap with small R
    c = base_cfg(NXT, 4, NZT); c.ls_mode = LS_NARROW_COLUMN; c.fidelity = FID_RELATIVE;
    c.r_lim = 8'd40; c.theta = 3'd1; c.phi = 4'd1; c.psi = 4'd1; c.vmin = -5'sd6; c.vmax = 5'sd9;
    run(c, 1000, 0, 1'b0);
    // both limits, P = 0, large noise
    c = base_cfg(NXT, 3, NZT); c.fidelity = FID_BOTH; c.a_lim = 8'd200; c.r_lim = 8'd3; c.p = 0;
    c.omega = 5'd4; c.r = 6'd32;
    run(c, 5000, 10, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
