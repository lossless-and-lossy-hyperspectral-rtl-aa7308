// predictor: prediction block of the CCSDS 123.0-B-2 compressor (BIL order).
//
// Takes raw samples in BIL order on a valid/ready stream and hands out one
// mapped quantizer index per sample on another, together with its band and
// first/last flags for the entropy coder. Datapath, as in the block diagram:
// neighbour storage -> local sums -> local differences -> predictor core
// (dot product, prediction, weight update with rho from rho_update) ->
// quantizer -> sample representative (fed back into the neighbour storage and,
// as central local difference, into the local difference storage) -> mapper.
// Weights live in the weights storage between lines of a band.
//
// Timing: the control unit runs the serial baseline schedule, so each sample
// takes 11 cycles plus the quantizer and mapper divisions (about
// 2*ceil(18/STEP) cycles when the error limit is not 0) plus any wait for the
// consumer. cfg must stay stable while busy. Full (near-lossless) version
// only; the run-time configuration selects lossless operation with fidelity 0.
module predictor
  import ccsds_pkg::*;
#(
  parameter int unsigned NX   = NX_MAX,
  parameter int unsigned NZ   = NZ_MAX,
  parameter int unsigned STEP = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  cfg_t         cfg,
  input  logic         start,
  output logic         busy,
  output logic         done,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [D-1:0] in_sample,
  output logic         out_valid,
  input  logic         out_ready,
  output mapped_t      out_data
);
  pstate_e       st;
  logic [XW-1:0] x;
  logic [YW-1:0] y;
  logic [ZW-1:0] z;
  logic [TW-1:0] t;
  logic x_first, x_last, y_first, z_first, t_zero, last;
  logic q_done, m_done;

  predictor_ctrl u_ctrl (
    .clk, .rst_n, .start, .nx(cfg.nx), .ny(cfg.ny), .nz(cfg.nz),
    .in_valid, .q_done, .m_done, .out_ready,
    .state(st), .x, .y, .z, .t, .x_first, .x_last, .y_first, .z_first,
    .t_zero, .last, .in_ready, .out_valid, .busy, .done);

  // ---------------- storage -------------------------------------------------
  logic          nb_rd_en;
  logic [ZW-1:0] nb_rd_z;
  logic [XW-1:0] nb_rd_x;
  logic [D-1:0]  nb_rd_data;
  logic          wb;
  cdiff_vec_t    ld_rd_data;
  wvec_t         w_rd_data, w_next;

  assign wb = (st == PS_OUT) && out_ready;

  always_comb begin
    nb_rd_en = 1'b1;
    nb_rd_z  = z;
    nb_rd_x  = x;
    unique case (st)
      PS_F1: nb_rd_x = x_last ? x : x + 1'b1;                 // NE
      PS_F2: begin                                            // band z-1, x-1
        nb_rd_z = z_first ? z : z - 1'b1;
        nb_rd_x = x_first ? x : x - 1'b1;
      end
      default: ;                                              // N
    endcase
  end

  logic [D-1:0] s_q, n_q, ne_q, wz1_q, w_reg, nw_reg, s_rep;

  neighbour_storage #(.NX(NX), .NZ(NZ)) u_nb (
    .clk, .rd_en(nb_rd_en), .rd_z(nb_rd_z), .rd_x(nb_rd_x), .rd_data(nb_rd_data),
    .wr_en(wb), .wr_z(z), .wr_x(x), .wr_data(s_rep));

  ldiff_t d_n, d_w, d_nw, d_c;
  cdiff_vec_t ld_q;

  local_diffs_storage #(.NX(NX)) u_lds (
    .clk, .rd_en(st == PS_IN), .rd_x(x), .rd_data(ld_rd_data),
    .wr_en(wb), .wr_x(x), .wr_prev(ld_q), .wr_dc(d_c));

  wvec_t w_q, w_upd_q;

  weights_storage #(.NZ(NZ)) u_ws (
    .clk, .omega(cfg.omega), .p(cfg.p), .rd_en(st == PS_IN), .rd_z(z),
    .rd_data(w_rd_data), .wr_en(wb), .init(t_zero), .wr_z(z), .wr_data(w_upd_q));

  // ---------------- fetch registers ----------------------------------------
  always_ff @(posedge clk) begin
    if (st == PS_IN && in_valid) s_q <= in_sample;
    if (st == PS_F1) begin
      n_q  <= nb_rd_data;
      ld_q <= ld_rd_data;
      w_q  <= w_rd_data;
    end
    if (st == PS_F2) ne_q  <= nb_rd_data;
    if (st == PS_F3) wz1_q <= nb_rd_data;
    if (wb) begin
      w_reg  <= s_rep;   // W of the next column
      nw_reg <= n_q;     // NW of the next column
    end
  end

  // ---------------- local sums / differences -------------------------------
  logic [LSW-1:0] sigma, sigma_q;
  uvec_t          u_c, u_q;

  local_sums u_ls (
    .mode(cfg.ls_mode), .x_first, .x_last, .y_first, .z_first,
    .s_w(w_reg), .s_nw(nw_reg), .s_n(n_q), .s_ne(ne_q), .s_wz1(wz1_q),
    .sigma);

  local_diffs u_ld (
    .x_first, .y_first, .sigma(sigma_q), .s_w(w_reg), .s_nw(nw_reg), .s_n(n_q),
    .s_rep, .d_n, .d_w, .d_nw, .d_c);

  // directional differences are formed from sigma of this sample
  ldiff_t dn_c, dw_c, dnw_c, dc_unused;
  local_diffs u_ld_dir (
    .x_first, .y_first, .sigma, .s_w(w_reg), .s_nw(nw_reg), .s_n(n_q),
    .s_rep('0), .d_n(dn_c), .d_w(dw_c), .d_nw(dnw_c), .d_c(dc_unused));

  always_comb begin
    u_c[0] = dn_c; u_c[1] = dw_c; u_c[2] = dnw_c;
    for (int i = 0; i < P_MAX; i++) u_c[3+i] = ld_q[i];
  end

  always_ff @(posedge clk) begin
    if (st == PS_LS) begin
      sigma_q <= sigma;
      u_q     <= u_c;
    end
  end

  // ---------------- prediction ---------------------------------------------
  logic [D+1:0]        s_til, s_til_q;
  logic [D-1:0]        s_hat, s_hat_q;
  logic signed [63:0]  s_chk, s_chk_q;
  logic signed [D+2:0] err, err_q;
  logic signed [6:0]   rho;
  logic signed [D:0]   delta_q;

  rho_update u_rho (
    .t, .nx(cfg.nx), .vmin(cfg.vmin), .vmax(cfg.vmax), .tinc(cfg.tinc),
    .omega(cfg.omega), .rho);

  predictor_core u_core (
    .t_zero, .z, .p(cfg.p), .full(cfg.full), .omega(cfg.omega), .r(cfg.r),
    .sigma(sigma_q), .u(u_q), .w(w_q), .s_prev_band(wz1_q),
    .s_til, .s_hat, .s_chk, .err(err_q), .rho, .w_next);

  always_ff @(posedge clk) begin
    if (st == PS_PRED) begin
      s_til_q <= s_til;
      s_hat_q <= s_hat;
      s_chk_q <= s_chk;
      delta_q <= $signed({1'b0, s_q}) - $signed({1'b0, s_hat});
    end
  end

  // ---------------- quantizer / representative / mapper ---------------------
  logic signed [D:0]   q;
  logic [ERR_BITS-1:0] m;
  logic [D-1:0]        s_bin, s_rep_c, delta_map;

  quantizer #(.STEP(STEP)) u_quant (
    .clk, .rst_n, .start(st == PS_Q), .delta(delta_q), .s_hat(s_hat_q),
    .t_zero, .fidelity(cfg.fidelity), .a_lim(cfg.a_lim), .r_lim(cfg.r_lim),
    .done(q_done), .q, .m);

  sample_representative u_sr (
    .t_zero, .s(s_q), .q, .m, .s_hat(s_hat_q), .s_til(s_til_q), .s_chk(s_chk_q),
    .omega(cfg.omega), .theta(cfg.theta), .phi(cfg.phi), .psi(cfg.psi),
    .s_bin, .s_rep(s_rep_c), .err);

  always_ff @(posedge clk) begin
    if (st == PS_MAP) begin
      s_rep <= s_rep_c;
      err_q <= err;
    end
    if (st == PS_MW) w_upd_q <= w_next;
  end

  mapper #(.STEP(STEP)) u_map (
    .clk, .rst_n, .start(st == PS_MAP), .q, .m, .s_hat(s_hat_q),
    .s_til_odd(s_til_q[0]), .done(m_done), .delta(delta_map));

  assign out_data = '{delta: delta_map, z: z, first: t_zero, last: last};
endmodule
