// hybrid_encoder: hybrid entropy coder of CCSDS 123.0-B-2 (BIL order).
//
// Mapped indices enter the adaptive code selection statistics (acss), which
// add the counter and accumulator of the sample's band. The high/low entropy
// decision routes each sample through the dispatch arbiter either to the
// high-entropy coder (hiec, one codeword per sample, buffered in a FIFO) or
// to the low-entropy coder, whose 16 variable-to-variable code tables are not
// part of this design: its input and response streams are ports. An order tag
// FIFO lets the code combiner collect the codewords in sample order and put
// the rescaling bits in front of them; the flush FSM appends the image tail.
// Output: codeword (right-aligned) and its length, valid/ready. Up to one
// sample per cycle while a band's line is being coded; two idle cycles when the
// band changes.
module hybrid_encoder
  import ccsds_pkg::*;
#(
  parameter int unsigned NZ        = NZ_MAX,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  cfg_t            cfg,
  input  logic            in_valid,
  output logic            in_ready,
  input  mapped_t         in_data,
  // low-entropy coder
  output logic            lo_valid,
  input  logic            lo_ready,
  output logic [D-1:0]    lo_delta,
  output logic [ZW-1:0]   lo_z,
  output logic [3:0]      lo_code,
  input  logic            lo_cw_valid,
  output logic            lo_cw_ready,
  input  logic [CW_W-1:0] lo_cw,
  input  logic [CL_W-1:0] lo_len,
  output logic            lo_flush_req,
  input  logic            lo_fl_valid,
  output logic            lo_fl_ready,
  input  logic [CW_W-1:0] lo_fl_cw,
  input  logic [CL_W-1:0] lo_fl_len,
  input  logic            lo_flush_done,
  // output
  output logic            out_valid,
  input  logic            out_ready,
  output logic [CW_W-1:0] out_cw,
  output logic [CL_W-1:0] out_len,
  output logic            out_end,
  // event counters for observation
  output logic            ev_high,
  output logic            ev_low,
  output logic            ev_resc
);
  localparam int unsigned FCW = $clog2(FIFO_DEPTH) + 1;

  logic            s_valid, s_ready, s_resc, s_resc_bit;
  mapped_t         s_data;
  logic [CNTW-1:0] s_cnt;
  logic [ACCW-1:0] s_acc, fl_acc;
  logic            fl_rd_en;
  logic [ZW-1:0]   fl_rd_z;

  acss #(.NZ(NZ)) u_acss (
    .clk, .rst_n, .gamma0(cfg.gamma0), .gstar(cfg.gstar), .acc_init(cfg.acc_init),
    .in_valid, .in_ready, .in_data,
    .out_valid(s_valid), .out_ready(s_ready), .out_data(s_data), .out_cnt(s_cnt),
    .out_acc(s_acc), .out_resc(s_resc), .out_resc_bit(s_resc_bit),
    .fl_rd_en, .fl_rd_z, .fl_rd_acc(fl_acc));

  logic       high;
  logic [3:0] code_idx;
  entropy_decision u_dec (.first(s_data.first), .cnt(s_cnt), .acc(s_acc), .high, .code_idx);

  logic     hi_valid, hi_ready, tag_valid, tag_ready;
  hyb_tag_t tag;
  hyb_arbiter u_arb (
    .in_valid(s_valid), .in_ready(s_ready), .high, .resc(s_resc), .resc_bit(s_resc_bit),
    .last(s_data.last), .hi_valid, .hi_ready, .lo_valid, .lo_ready,
    .tag_valid, .tag_ready, .tag);

  assign lo_delta = s_data.delta;
  assign lo_z     = s_data.z;
  assign lo_code  = code_idx;

  logic [4:0]      k;
  logic [CW_W-1:0] h_cw;
  logic [CL_W-1:0] h_len;
  hiec u_hiec (.first(s_data.first), .delta(s_data.delta), .cnt(s_cnt), .acc(s_acc),
               .umax(cfg.umax), .k, .cw(h_cw), .len(h_len));

  // FIFOs: order tags, high-entropy codewords, low-entropy responses
  hyb_tag_t        t_head;
  logic            t_valid, t_pop;
  logic            hq_valid, hq_ready, lq_valid, lq_ready;
  logic [CW_W+CL_W-1:0] hq_head, lq_head;
  logic [FCW-1:0]  t_cnt, h_cnt, l_cnt;

  sync_fifo #(.WIDTH($bits(hyb_tag_t)), .DEPTH(FIFO_DEPTH)) u_tag_fifo (
    .clk, .rst_n, .in_valid(tag_valid), .in_ready(tag_ready), .in_data(tag),
    .out_valid(t_valid), .out_ready(t_pop), .out_data(t_head), .count(t_cnt));
  sync_fifo #(.WIDTH(CW_W + CL_W), .DEPTH(FIFO_DEPTH)) u_hi_fifo (
    .clk, .rst_n, .in_valid(hi_valid), .in_ready(hi_ready), .in_data({h_cw, h_len}),
    .out_valid(hq_valid), .out_ready(hq_ready), .out_data(hq_head), .count(h_cnt));
  sync_fifo #(.WIDTH(CW_W + CL_W), .DEPTH(FIFO_DEPTH)) u_lo_fifo (
    .clk, .rst_n, .in_valid(lo_cw_valid), .in_ready(lo_cw_ready), .in_data({lo_cw, lo_len}),
    .out_valid(lq_valid), .out_ready(lq_ready), .out_data(lq_head), .count(l_cnt));

  logic            c_valid, c_ready, c_last;
  logic [CW_W-1:0] c_cw;
  logic [CL_W-1:0] c_len;
  code_combiner u_comb (
    .clk, .rst_n, .tag_valid(t_valid), .tag_ready(t_pop), .tag(t_head),
    .hi_valid(hq_valid), .hi_ready(hq_ready), .hi_cw(hq_head[CW_W+CL_W-1:CL_W]), .hi_len(hq_head[CL_W-1:0]),
    .lo_valid(lq_valid), .lo_ready(lq_ready), .lo_cw(lq_head[CW_W+CL_W-1:CL_W]), .lo_len(lq_head[CL_W-1:0]),
    .out_valid(c_valid), .out_ready(c_ready), .out_cw(c_cw), .out_len(c_len), .out_last(c_last));

  logic tail_active;
  flush_fsm u_flush (
    .clk, .rst_n, .nz(cfg.nz), .gstar(cfg.gstar),
    .in_valid(c_valid), .in_ready(c_ready), .in_cw(c_cw), .in_len(c_len), .in_last(c_last),
    .lo_flush_req, .lo_fl_valid, .lo_fl_ready, .lo_fl_cw, .lo_fl_len, .lo_flush_done,
    .acc_rd_en(fl_rd_en), .acc_rd_z(fl_rd_z), .acc_rd_data(fl_acc),
    .out_valid, .out_ready, .out_cw, .out_len, .out_end, .tail_active);

  assign ev_high = s_valid && s_ready && high;
  assign ev_low  = s_valid && s_ready && !high;
  assign ev_resc = s_valid && s_ready && s_resc;
endmodule
