// mapper: maps the signed quantizer index to the unsigned mapped index of
// CCSDS 123.0-B-2.
//
//   theta = min(floor((s_hat + m)/(2m+1)), floor((smax - s_hat + m)/(2m+1)))
//           (at t = 0: min(s_hat, smax - s_hat))
//   delta = |q| + theta          if |q| > theta
//         = 2|q|                 if 0 <= (-1)^s_til * q <= theta
//         = 2|q| - 1             otherwise
// The two divisions run in parallel on iterative dividers; with m = 0 they
// are skipped. done pulses when delta is valid; it holds until the next start.
module mapper
  import ccsds_pkg::*;
#(
  parameter int unsigned STEP = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic signed [D:0]    q,
  input  logic [ERR_BITS-1:0]  m,
  input  logic [D-1:0]         s_hat,
  input  logic                 s_til_odd,
  output logic                 done,
  output logic [D-1:0]         delta
);
  logic [D:0]   q_q;        // |q|
  logic         qsign_q, odd_q, div_mode_q;
  logic [D-1:0] sh_q;
  logic [D+1:0] quot_lo, quot_hi;
  logic [ERR_BITS:0] rem_lo, rem_hi;
  logic done_lo, done_hi, busy_lo, busy_hi, div_start, fin;
  logic [D+1:0] th;

  assign div_start = start && (m != 0);

  iter_div #(.NW(D + 2), .DW(ERR_BITS + 1), .STEP(STEP)) u_div_lo (
    .clk, .rst_n, .start(div_start),
    .num((D + 2)'(s_hat) + (D + 2)'(m)), .den({m, 1'b1}),
    .busy(busy_lo), .done(done_lo), .quot(quot_lo), .rem(rem_lo));
  iter_div #(.NW(D + 2), .DW(ERR_BITS + 1), .STEP(STEP)) u_div_hi (
    .clk, .rst_n, .start(div_start),
    .num((D + 2)'(SMAX - s_hat) + (D + 2)'(m)), .den({m, 1'b1}),
    .busy(busy_hi), .done(done_hi), .quot(quot_hi), .rem(rem_hi));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_q <= '0; qsign_q <= 1'b0; odd_q <= 1'b0; div_mode_q <= 1'b0; sh_q <= '0;
      fin <= 1'b0;
    end else begin
      fin <= 1'b0;
      if (start) begin
        q_q        <= $unsigned(q[D] ? -q : q);
        qsign_q    <= q[D];
        odd_q      <= s_til_odd;
        sh_q       <= s_hat;
        div_mode_q <= (m != 0);
        if (m == 0) fin <= 1'b1;
      end else if (done_lo) begin
        fin <= 1'b1;
      end
    end
  end
  assign done = fin;

  always_comb begin
    logic [D+1:0] a, b, mag;
    logic         nonneg;   // (-1)^s_til * q >= 0
    if (div_mode_q) begin a = quot_lo; b = quot_hi; end
    else begin a = (D+2)'(sh_q); b = (D+2)'(SMAX - sh_q); end
    th  = (a < b) ? a : b;
    mag = (D+2)'(q_q);
    nonneg = (q_q == 0) || (qsign_q == odd_q);
    if (mag > th)            delta = D'(mag + th);
    else if (nonneg)         delta = D'(mag << 1);
    else                     delta = D'((mag << 1) - 1'b1);
  end
endmodule
