// sample_representative: clipped quantizer bin centre, sample representative
// and double-resolution prediction error of CCSDS 123.0-B-2.
//
// Combinational:
//   s'   = clip(s_hat + q*(2m+1), 0, smax)
//   s~'' = floor((4*(2^theta - phi)*(s'*2^omega - sgn(q)*m*psi*2^(omega-theta))
//                 + phi*s_chk - phi*2^(omega+1)) / 2^(omega+theta+1))
//   s''  = floor((s~'' + 1) / 2)
//   e    = 2*s' - s_til
// At t = 0 the representative and the bin centre are the sample itself. With
// phi = psi = 0 the representative equals the bin centre, so the lossless case
// reconstructs the input exactly.
module sample_representative
  import ccsds_pkg::*;
(
  input  logic                 t_zero,
  input  logic [D-1:0]         s,        // input sample
  input  logic signed [D:0]    q,
  input  logic [ERR_BITS-1:0]  m,
  input  logic [D-1:0]         s_hat,
  input  logic [D+1:0]         s_til,
  input  logic signed [63:0]   s_chk,
  input  logic [4:0]           omega,
  input  logic [2:0]           theta,
  input  logic [3:0]           phi,
  input  logic [3:0]           psi,
  output logic [D-1:0]         s_bin,    // s'
  output logic [D-1:0]         s_rep,    // s''
  output logic signed [D+2:0]  err       // e
);
  always_comb begin
    logic signed [63:0] c, sg, num, dr, rep;
    c = 64'(s_hat) + 64'(q) * (2 * 64'(m) + 1);
    if (c < 0) c = 0;
    if (c > 64'(SMAX)) c = 64'(SMAX);
    if (t_zero) c = 64'(s);
    sg  = (q > 0) ? 64'sd1 : (q < 0) ? -64'sd1 : 64'sd0;
    num = 4 * ((64'sd1 <<< theta) - 64'(phi))
            * ((c <<< omega) - ((sg * 64'(m) * 64'(psi)) <<< (omega - {2'b00, theta})))
          + 64'(phi) * s_chk - (64'(phi) <<< (omega + 1));
    dr  = num >>> (omega + {2'b00, theta} + 1);
    rep = (dr + 1) >>> 1;
    if (t_zero) rep = 64'(s);
    s_bin = D'(c);
    s_rep = D'(rep);
    err   = (D+3)'(2 * c - 64'(s_til));
  end
endmodule
