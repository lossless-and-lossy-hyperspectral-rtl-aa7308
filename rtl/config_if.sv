// config_if: AHB-Lite configuration interface and configuration unit.
//
// A host writes the run-time compression parameters into word registers over
// an AHB-Lite slave port (zero wait states, OKAY responses) and starts a run
// by writing 1 to bit 0 of CTRL. The configuration unit then checks the
// parameters against the limits of this instance; a valid set is copied into
// the active configuration cfg, which stays fixed during the run, and start
// pulses for one cycle. An invalid set raises the error flag instead.
//
// Register map (byte addresses, all fields right-aligned unless noted):
//   0x00 CTRL    W: [0] start          R: [0] busy [1] done [2] error
//   0x04 NX      0x08 NY      0x0C NZ
//   0x10 PRED    [1:0] P  [2] full mode  [5:4] local sum mode
//   0x14 WEIGHT  [4:0] omega  [13:8] register size R
//   0x18 RHO     [4:0] vmin  [12:8] vmax (two's complement)  [19:16] tinc
//   0x1C QUANT   [1:0] fidelity  [15:8] absolute limit  [23:16] relative limit
//   0x20 SREP    [2:0] theta  [7:4] phi  [11:8] psi
//   0x24 HYB     [3:0] gamma0  [7:4] gstar  [13:8] Umax
//   0x28 ACCINIT initial hybrid accumulator
// The register map and reset values are this design's choice.
module config_if
  import ccsds_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // AHB-Lite slave
  input  logic        hsel,
  input  logic [7:0]  haddr,
  input  logic        hwrite,
  input  logic [1:0]  htrans,
  input  logic [2:0]  hsize,
  input  logic [31:0] hwdata,
  input  logic        hready,
  output logic        hreadyout,
  output logic        hresp,
  output logic [31:0] hrdata,
  // core
  input  logic        core_busy,
  input  logic        core_done,
  output logic        start,
  output cfg_t        cfg
);
  cfg_t        regs;
  logic        wr_pend;
  logic [7:0]  wr_addr;
  logic        done_flag, err_flag, start_req;
  logic        valid;

  assign hreadyout = 1'b1;
  assign hresp     = 1'b0;

  // parameter limits of this instance
  always_comb begin
    valid = 1'b1;
    if (regs.nx < 2 || regs.nx > (XW+1)'(NX_MAX)) valid = 1'b0;
    if (regs.ny < 1 || regs.ny > (YW+1)'(NY_MAX)) valid = 1'b0;
    if (regs.nz < 1 || regs.nz > (ZW+1)'(NZ_MAX)) valid = 1'b0;
    if (regs.omega < 4 || regs.omega > 5'(OMEGA_MAX)) valid = 1'b0;
    if (regs.r < 6'(D) + 6'(regs.omega) + 6'd2 || regs.r < 6'd32 || regs.r > 6'(R_MAX)) valid = 1'b0;
    if (regs.vmin < -5'sd6 || regs.vmax > 5'sd9 || regs.vmin > regs.vmax) valid = 1'b0;
    if (regs.tinc < 4 || regs.tinc > 11) valid = 1'b0;
    if (regs.theta > 3'(THETA_MAX)) valid = 1'b0;
    if (regs.phi >= (4'd1 << regs.theta) && regs.theta != 0) valid = 1'b0;
    if (regs.psi >= (4'd1 << regs.theta) && regs.theta != 0) valid = 1'b0;
    if (regs.theta == 0 && (regs.phi != 0 || regs.psi != 0)) valid = 1'b0;
    if (regs.gamma0 < 1 || regs.gamma0 > 4'(GAMMA0_MAX)) valid = 1'b0;
    if (regs.gstar < 4'(GAMMA0_MAX + 1) || regs.gstar < 4 || regs.gstar > 4'(GSTAR_MAX)) valid = 1'b0;
    if (regs.umax < 8 || regs.umax > 6'(UMAX_MAX)) valid = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      regs <= '{nx: (XW+1)'(NX_MAX), ny: (YW+1)'(NY_MAX), nz: (ZW+1)'(NZ_MAX),
                p: 2'(P_MAX), full: 1'b1, ls_mode: LS_WIDE_NEIGHBOUR,
                omega: 5'(OMEGA_MAX), r: 6'(R_MAX), vmin: -5'sd1, vmax: 5'sd3,
                tinc: 4'd6, fidelity: FID_LOSSLESS, a_lim: '0, r_lim: '0,
                theta: '0, phi: '0, psi: '0, gamma0: 4'd1, gstar: 4'(GSTAR_MAX),
                umax: 6'(UMAX_MAX), acc_init: ACCW'(8)};
      cfg <= '0;
      wr_pend <= 1'b0; wr_addr <= '0;
      done_flag <= 1'b0; err_flag <= 1'b0; start_req <= 1'b0; start <= 1'b0;
    end else begin
      start     <= 1'b0;
      start_req <= 1'b0;
      if (core_done) done_flag <= 1'b1;
      // address phase
      if (hready) begin
        wr_pend <= hsel && hwrite && htrans[1];
        wr_addr <= haddr;
      end
      // data phase
      if (wr_pend) begin
        unique case (wr_addr[7:2])
          6'h00: if (hwdata[0] && !core_busy) start_req <= 1'b1;
          6'h01: regs.nx <= hwdata[XW:0];
          6'h02: regs.ny <= hwdata[YW:0];
          6'h03: regs.nz <= hwdata[ZW:0];
          6'h04: begin
            regs.p <= hwdata[1:0]; regs.full <= hwdata[2];
            regs.ls_mode <= ls_mode_e'(hwdata[5:4]);
          end
          6'h05: begin regs.omega <= hwdata[4:0]; regs.r <= hwdata[13:8]; end
          6'h06: begin
            regs.vmin <= hwdata[4:0]; regs.vmax <= hwdata[12:8]; regs.tinc <= hwdata[19:16];
          end
          6'h07: begin
            regs.fidelity <= fidelity_e'(hwdata[1:0]);
            regs.a_lim <= hwdata[15:8]; regs.r_lim <= hwdata[23:16];
          end
          6'h08: begin
            regs.theta <= hwdata[2:0]; regs.phi <= hwdata[7:4]; regs.psi <= hwdata[11:8];
          end
          6'h09: begin
            regs.gamma0 <= hwdata[3:0]; regs.gstar <= hwdata[7:4]; regs.umax <= hwdata[13:8];
          end
          6'h0A: regs.acc_init <= hwdata[ACCW-1:0];
          default: ;
        endcase
      end
      // configuration unit
      if (start_req) begin
        if (valid) begin
          cfg       <= regs;
          start     <= 1'b1;
          done_flag <= 1'b0;
          err_flag  <= 1'b0;
        end else begin
          err_flag  <= 1'b1;
        end
      end
    end
  end

  // read data (registered in the address phase, presented in the data phase)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) hrdata <= '0;
    else if (hready && hsel && !hwrite && htrans[1]) begin
      unique case (haddr[7:2])
        6'h00: hrdata <= {29'd0, err_flag, done_flag, core_busy};
        6'h01: hrdata <= 32'(regs.nx);
        6'h02: hrdata <= 32'(regs.ny);
        6'h03: hrdata <= 32'(regs.nz);
        6'h04: hrdata <= {26'd0, regs.ls_mode, 1'b0, regs.full, regs.p};
        6'h05: hrdata <= {18'd0, regs.r, 3'd0, regs.omega};
        6'h06: hrdata <= {12'd0, regs.tinc, 3'd0, regs.vmax, 3'd0, regs.vmin};
        6'h07: hrdata <= {8'd0, regs.r_lim, regs.a_lim, 6'd0, regs.fidelity};
        6'h08: hrdata <= {20'd0, regs.psi, regs.phi, 1'b0, regs.theta};
        6'h09: hrdata <= {18'd0, regs.umax, regs.gstar, regs.gamma0};
        6'h0A: hrdata <= 32'(regs.acc_init);
        default: hrdata <= '0;
      endcase
    end
  end

  // Registers are 32 bits wide: only word transfers are supported.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (hsel && hready && htrans[1]) |-> (hsize == 3'b010));
endmodule
