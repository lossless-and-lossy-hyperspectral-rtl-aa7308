// quantizer: uniform quantizer of CCSDS 123.0-B-2 near-lossless compression.
//
// On start it derives the error limit m from the fidelity setting (absolute:
// a; relative: floor(r*|s_hat| / 2^D); both: the smaller) and computes
//   q = sgn(delta) * floor((|delta| + m) / (2m + 1))
// with an iterative divider (STEP quotient bits per cycle), so the step size
// of the division is configurable. At t = 0 and in lossless mode q = delta.
// done pulses when q and m are valid, 1 cycle after start when no division
// is needed and ceil((D+2)/STEP) + 2 cycles after it otherwise; q and m hold
// until the next start.
module quantizer
  import ccsds_pkg::*;
#(
  parameter int unsigned STEP = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic signed [D:0]    delta,    // prediction residual s - s_hat
  input  logic [D-1:0]         s_hat,
  input  logic                 t_zero,
  input  fidelity_e            fidelity,
  input  logic [ERR_BITS-1:0]  a_lim,
  input  logic [ERR_BITS-1:0]  r_lim,
  output logic                 done,
  output logic signed [D:0]    q,
  output logic [ERR_BITS-1:0]  m
);
  logic [ERR_BITS-1:0] m_c, m_rel;
  logic [D:0]          mag;
  logic                neg_q, bypass_q, div_start, div_done, div_busy;
  logic [D+1:0]        quot;
  logic [ERR_BITS:0]   rem;
  logic signed [D:0]   delta_q;

  assign m_rel = ERR_BITS'((D + ERR_BITS)'(r_lim) * (D + ERR_BITS)'(s_hat) >> D);
  always_comb begin
    unique case (fidelity)
      FID_ABSOLUTE: m_c = a_lim;
      FID_RELATIVE: m_c = m_rel;
      FID_BOTH:     m_c = (a_lim < m_rel) ? a_lim : m_rel;
      default:      m_c = '0;
    endcase
    if (t_zero) m_c = '0;
  end
  assign mag = $unsigned(delta[D] ? -delta : delta);

  iter_div #(.NW(D + 2), .DW(ERR_BITS + 1), .STEP(STEP)) u_div (
    .clk, .rst_n, .start(div_start),
    .num((D + 2)'(mag) + (D + 2)'(m_c)),
    .den({m_c, 1'b1}),
    .busy(div_busy), .done(div_done), .quot(quot), .rem(rem)
  );

  assign div_start = start && (m_c != 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      neg_q <= 1'b0; bypass_q <= 1'b0; m <= '0; done <= 1'b0; delta_q <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        neg_q    <= delta[D];
        m        <= m_c;
        delta_q  <= delta;
        bypass_q <= (m_c == 0);
        if (m_c == 0) done <= 1'b1;
      end else if (div_done) begin
        done <= 1'b1;
      end
    end
  end

  always_comb begin
    if (bypass_q)   q = delta_q;
    else if (neg_q) q = -(D+1)'(quot);
    else            q = (D+1)'(quot);
  end
endmodule
