// ccsds123_core: CCSDS 123.0-B-2 lossless / near-lossless compressor for
// multi- and hyperspectral images, BIL processing order, hybrid entropy coder.
//
// Raw samples enter on a valid/ready stream, optionally through the BIP-to-BIL
// sample reordering block (INPUT_BIP = 1), then pass the prediction block,
// which turns each into a mapped quantizer index, and the hybrid entropy coder,
// whose codewords are packed into 32-bit output words. The run-time
// configuration (image size, prediction, quantization and coder parameters)
// is written over AHB-Lite into the configuration interface, which also
// starts each run. The low-entropy coder of the hybrid encoder is not part of
// this design: its request, response and flush streams are brought out as
// ports (tie lo_ready, lo_cw_valid, lo_fl_valid low and lo_flush_done high
// when no low-entropy coder is attached; the design then needs every sample to
// be high-entropy to make progress). The compression header is not generated.
//
// Timing: the predictor's serial schedule sets the throughput (11
// cycles per sample in lossless mode); the entropy coder and packer take up
// to one sample per cycle.
module ccsds123_core
  import ccsds_pkg::*;
#(
  parameter bit          INPUT_BIP = 1'b0,
  parameter int unsigned NX        = NX_MAX,
  parameter int unsigned NZ        = NZ_MAX,
  parameter int unsigned STEP      = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  // AHB-Lite configuration port
  input  logic             hsel,
  input  logic [7:0]       haddr,
  input  logic             hwrite,
  input  logic [1:0]       htrans,
  input  logic [2:0]       hsize,
  input  logic [31:0]      hwdata,
  input  logic             hready,
  output logic             hreadyout,
  output logic             hresp,
  output logic [31:0]      hrdata,
  // raw samples
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [D-1:0]     in_sample,
  // low-entropy coder
  output logic             lo_valid,
  input  logic             lo_ready,
  output logic [D-1:0]     lo_delta,
  output logic [ZW-1:0]    lo_z,
  output logic [3:0]       lo_code,
  input  logic             lo_cw_valid,
  output logic             lo_cw_ready,
  input  logic [CW_W-1:0]  lo_cw,
  input  logic [CL_W-1:0]  lo_len,
  output logic             lo_flush_req,
  input  logic             lo_fl_valid,
  output logic             lo_fl_ready,
  input  logic [CW_W-1:0]  lo_fl_cw,
  input  logic [CL_W-1:0]  lo_fl_len,
  input  logic             lo_flush_done,
  // compressed output
  output logic             out_valid,
  input  logic             out_ready,
  output logic [OUT_W-1:0] out_word,
  output logic             out_last,
  // status and events
  output logic             busy,
  output logic             ev_high,
  output logic             ev_low,
  output logic             ev_resc
);
  cfg_t cfg;
  logic start, p_busy, p_done;

  config_if u_cfg (
    .clk, .rst_n, .hsel, .haddr, .hwrite, .htrans, .hsize, .hwdata, .hready,
    .hreadyout, .hresp, .hrdata, .core_busy(busy), .core_done(out_valid && out_ready && out_last),
    .start, .cfg);

  // busy from start until the last output word has left
  logic run;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) run <= 1'b0;
    else if (start) run <= 1'b1;
    else if (out_valid && out_ready && out_last) run <= 1'b0;
  end
  assign busy = run;

  // ---------------- optional BIP to BIL reordering --------------------------
  logic         r_valid, r_ready;
  logic [D-1:0] r_sample;
  if (INPUT_BIP) begin : g_reorder
    sample_reorder #(.NX(NX), .NZ(NZ)) u_reorder (
      .clk, .rst_n, .start, .nx(cfg.nx), .ny(cfg.ny), .nz(cfg.nz),
      .in_valid, .in_ready, .in_sample,
      .out_valid(r_valid), .out_ready(r_ready), .out_sample(r_sample));
  end else begin : g_direct
    assign r_valid  = in_valid;
    assign in_ready = r_ready;
    assign r_sample = in_sample;
  end

  // ---------------- prediction block ---------------------------------------
  logic    m_valid, m_ready;
  mapped_t m_data;
  predictor #(.NX(NX), .NZ(NZ), .STEP(STEP)) u_pred (
    .clk, .rst_n, .cfg, .start, .busy(p_busy), .done(p_done),
    .in_valid(r_valid), .in_ready(r_ready), .in_sample(r_sample),
    .out_valid(m_valid), .out_ready(m_ready), .out_data(m_data));

  // ---------------- entropy coding block -----------------------------------
  logic            e_valid, e_ready, e_end;
  logic [CW_W-1:0] e_cw;
  logic [CL_W-1:0] e_len;
  hybrid_encoder #(.NZ(NZ)) u_enc (
    .clk, .rst_n, .cfg, .in_valid(m_valid), .in_ready(m_ready), .in_data(m_data),
    .lo_valid, .lo_ready, .lo_delta, .lo_z, .lo_code,
    .lo_cw_valid, .lo_cw_ready, .lo_cw, .lo_len,
    .lo_flush_req, .lo_fl_valid, .lo_fl_ready, .lo_fl_cw, .lo_fl_len, .lo_flush_done,
    .out_valid(e_valid), .out_ready(e_ready), .out_cw(e_cw), .out_len(e_len), .out_end(e_end),
    .ev_high, .ev_low, .ev_resc);

  bit_packer u_pack (
    .clk, .rst_n, .in_valid(e_valid), .in_ready(e_ready), .in_cw(e_cw), .in_len(e_len),
    .in_end(e_end), .out_valid, .out_ready, .out_word, .out_last);
endmodule
