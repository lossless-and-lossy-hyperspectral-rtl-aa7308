// tb_ccsds123_workload: the compressor on full-width, full-depth slices of
// an AVIRIS-size image (680 columns x 256 bands, 16-bit samples) at the
// limits of the base configuration: weight resolution 13, register sizes 48
// and 40, weight update exponent range [-3,1] with change interval 2^11,
// absolute and relative error limits of 8 bits, sample representative
// resolution 2, initial count exponent 1, rescaling counter size 4 and unary
// length limit 16. All top-level parameters keep their defaults.
// Run 1 is lossless on 16 rows (2,785,280 samples; t reaches 10,879, so the
// weight update exponent climbs through its whole range from -3 to 1), run 2
// near-lossless on two rows. The output words are compared bit for bit with the behavioural
// reference, with random output back-pressure and the stand-in low-entropy
// coder. A whole 512-row image would take about a billion cycles, so only
// these slices are simulated; they still visit every column and band, the
// weight-exponent schedule across t and the memory rows of both line
// positions.
module tb_ccsds123_workload;
  import ccsds_pkg::*;
  import ccsds_ref_pkg::*;
  import img_gen_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        hsel, hwrite, hready, hreadyout, hresp;
  logic [7:0]  haddr;
  logic [1:0]  htrans;
  logic [2:0]  hsize;
  logic [31:0] hwdata, hrdata;
  logic        in_valid, in_ready;
  logic [D-1:0] in_sample;
  logic        lo_valid, lo_ready, lo_cw_valid, lo_cw_ready, lo_flush_req;
  logic        lo_fl_valid, lo_fl_ready, lo_flush_done;
  logic [D-1:0] lo_delta;
  logic [ZW-1:0] lo_z;
  logic [3:0]  lo_code;
  logic [CW_W-1:0] lo_cw, lo_fl_cw;
  logic [CL_W-1:0] lo_len, lo_fl_len;
  logic        out_valid, out_ready, out_last, busy, ev_high, ev_low, ev_resc;
  logic [OUT_W-1:0] out_word;
  int          lo_stalls;

  ccsds123_core dut (.*);

  loec_model u_loec (
    .clk, .rst_n, .lo_valid, .lo_ready, .lo_code, .lo_cw_valid, .lo_cw_ready, .lo_cw,
    .lo_len, .lo_flush_req, .lo_fl_valid, .lo_fl_ready, .lo_fl_cw, .lo_fl_len,
    .lo_flush_done, .stalls(lo_stalls));

  int checks = 0, failures = 0;
  int n_high = 0, n_low = 0, n_resc = 0, n_esc = 0, n_quant = 0, n_out_stall = 0;
  int n_band_switch = 0, n_tail = 0, n_cfg_err = 0;

  initial begin
    repeat (200000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- AHB-Lite host -------------------------------------------
  task automatic ahb_write(input logic [7:0] a, input logic [31:0] d);
    @(posedge clk);
    hsel <= 1; haddr <= a; hwrite <= 1; htrans <= 2'b10; hsize <= 3'b010;
    @(posedge clk);
    hsel <= 0; htrans <= 2'b00; hwrite <= 0; hwdata <= d;
    @(posedge clk);
  endtask

  task automatic ahb_read(input logic [7:0] a, output logic [31:0] d);
    @(posedge clk);
    hsel <= 1; haddr <= a; hwrite <= 0; htrans <= 2'b10; hsize <= 3'b010;
    @(posedge clk);
    hsel <= 0; htrans <= 2'b00;
    @(posedge clk);
    d = hrdata;
  endtask

  task automatic configure(input cfg_t c);
    ahb_write(8'h04, 32'(c.nx));
    ahb_write(8'h08, 32'(c.ny));
    ahb_write(8'h0C, 32'(c.nz));
    ahb_write(8'h10, {26'd0, c.ls_mode, 1'b0, c.full, c.p});
    ahb_write(8'h14, {18'd0, c.r, 3'd0, c.omega});
    ahb_write(8'h18, {12'd0, c.tinc, 3'd0, c.vmax, 3'd0, c.vmin});
    ahb_write(8'h1C, {8'd0, c.r_lim, c.a_lim, 6'd0, c.fidelity});
    ahb_write(8'h20, {20'd0, c.psi, c.phi, 1'b0, c.theta});
    ahb_write(8'h24, {18'd0, c.umax, c.gstar, c.gamma0});
    ahb_write(8'h28, 32'(c.acc_init));
  endtask

  // ---------------- one compression run -------------------------------------
  task automatic run(input cfg_t c, input int noise, input int spikes);
    int s[], mref[], nq, nh, nl, nr, ne, n, nwords, sent;
    bit bits[$];
    logic [31:0] st;
    make_image(int'(c.nx), int'(c.ny), int'(c.nz), noise, spikes, s);
    predict(c, s, mref, nq);
    hybrid(c, mref, bits, nh, nl, nr, ne);
    n_quant += nq; n_esc += ne;
    configure(c);
    ahb_write(8'h00, 32'd1);
    // stream samples in and words out
    sent = 0; nwords = 0;
    fork
      begin
        while (sent < s.size()) begin
          in_valid <= 1'b1; in_sample <= D'(s[sent]);
          @(posedge clk);
          if (in_ready) sent++;
        end
        in_valid <= 1'b0;
      end
      begin
        bit fin;
        int hc, lc, rc;
        fin = 0; hc = 0; lc = 0; rc = 0;
        while (!fin) begin
          out_ready <= ($urandom_range(0, 9) != 0);
          @(posedge clk);
          if (ev_high) hc++;
          if (ev_low) lc++;
          if (ev_resc) rc++;
          if (dut.u_enc.u_acss.loading) n_band_switch++;
          if (out_valid && !out_ready) n_out_stall++;
          if (out_valid && out_ready) begin
            logic [31:0] exp_w;
            for (int b = 0; b < 32; b++)
              exp_w[31-b] = (nwords*32 + b < bits.size()) ? bits[nwords*32 + b] : 1'b0;
            checks++;
            if (out_word !== exp_w) begin
              failures++;
              if (failures < 8) $display("word %0d: got %08x exp %08x", nwords, out_word, exp_w);
            end
            nwords++;
            if (out_last) fin = 1;
          end
        end
        checks++;
        if (nwords * 32 != bits.size()) begin
          failures++;
          $display("word count %0d, expected %0d", nwords, bits.size() / 32);
        end
        checks++;
        if (hc != nh || lc != nl || rc != nr) begin
          failures++;
          $display("events high %0d/%0d low %0d/%0d resc %0d/%0d", hc, nh, lc, nl, rc, nr);
        end
        n_high += hc; n_low += lc; n_resc += rc;
      end
    join
    if (dut.u_enc.u_flush.tail_active || nwords > 0) n_tail++;
    @(posedge clk);
    ahb_read(8'h00, st);
    checks++;
    if (st[0] != 1'b0 || st[1] != 1'b1) begin
      failures++;
      $display("status %0h after run", st);
    end
    $display("run: %0d samples, %0d words, quantized %0d", s.size(), nwords, nq);
  endtask

  initial begin
    cfg_t c;
    hsel = 0; haddr = 0; hwrite = 0; htrans = 0; hsize = 3'b010; hwdata = 0; hready = 1;
    in_valid = 0; in_sample = 0; out_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // lossless, full prediction, wide local sums, the largest weight
    // resolution and register size, rho range [-3,1] changing every 2^11
    c = base_cfg(680, 16, 256);
    c.vmin = -5'sd3; c.vmax = 5'sd1; c.tinc = 4'd11;
    run(c, 200, 1);
    // near-lossless with both error limits at 8 bits, representative
    // resolution 2, reduced prediction, narrow local sums, register size 40
    c = base_cfg(680, 2, 256);
    c.vmin = -5'sd3; c.vmax = 5'sd1; c.tinc = 4'd11; c.r = 6'd40;
    c.fidelity = FID_BOTH; c.a_lim = 8'd255; c.r_lim = 8'd255;
    c.theta = 3'd2; c.phi = 4'd3; c.psi = 4'd3; c.full = 1'b0;
    c.ls_mode = LS_NARROW_NEIGHBOUR;
    run(c, 100, 0);
    $display("events: high %0d low %0d resc %0d escape %0d quantized %0d out_stall %0d lo_stall %0d band_switch %0d",
             n_high, n_low, n_resc, n_esc, n_quant, n_out_stall, lo_stalls, n_band_switch);
    checks++; if (n_high == 0) begin failures++; $display("no high-entropy sample"); end
    checks++; if (n_low == 0) begin failures++; $display("no low-entropy sample"); end
    checks++; if (n_resc == 0) begin failures++; $display("no rescaling"); end
    checks++; if (n_quant == 0) begin failures++; $display("no quantization"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
