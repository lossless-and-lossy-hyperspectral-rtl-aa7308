// predictor_core: dot product, prediction and weight update of CCSDS 123.0-B-2.
//
// Combinational; the predictor registers its inputs and outputs around it.
//  * Dot product d_hat = sum(w_i * U_i) over the components in use: the three
//    directional differences in full prediction mode, then the central
//    differences of the previous P* = min(z,P) bands.
//  * High-resolution prediction
//      s_chk = clip(modR(d_hat + 2^omega*(sigma - 4*smid)) + 2^(omega+2)*smid
//                   + 2^(omega+1), 0, 2^(omega+2)*smax + 2^(omega+1))
//    double resolution s_til = floor(s_chk / 2^(omega+1)), and at t = 0
//    s_til = 2*s''_(z-1)(0) when P > 0 and z > 0, else 2*smid. The predicted
//    sample is s_hat = floor(s_til / 2).
//  * Weight update with the double-resolution error e:
//      w_i += floor((sgn+(e) * 2^-rho * U_i + 1) / 2), clipped to
//      [-2^(omega+2), 2^(omega+2)-1].
// Intermediate arithmetic is 64 bits wide, which covers every register size up
// to R_MAX; modR wraps to the configured register size r. The weight update
// uses the standard's formula as written.
module predictor_core
  import ccsds_pkg::*;
(
  input  logic               t_zero,     // t == 0
  input  logic [ZW-1:0]      z,
  input  logic [1:0]         p,
  input  logic               full,
  input  logic [4:0]         omega,
  input  logic [5:0]         r,
  input  logic [LSW-1:0]     sigma,
  input  uvec_t              u,          // [0]=dN [1]=dW [2]=dNW [3+i]=d_(z-1-i)
  input  wvec_t              w,
  input  logic [D-1:0]       s_prev_band, // s''_(z-1)(0), used at t == 0
  output logic [D+1:0]       s_til,      // double-resolution predicted sample
  output logic [D-1:0]       s_hat,      // predicted sample
  output logic signed [63:0] s_chk,      // high-resolution predicted sample
  // weight update
  input  logic signed [D+2:0] err,       // double-resolution prediction error
  input  logic signed [6:0]  rho,
  output wvec_t              w_next
);
  logic [C_MAX-1:0] used;
  logic signed [63:0] dhat, v, m, hi;
  logic [D+1:0] til;

  always_comb begin
    for (int i = 0; i < C_MAX; i++) begin
      if (i < 3) used[i] = full;
      else       used[i] = (i - 3 < int'(p)) && (i - 3 < int'(z));
    end
  end

  // prediction
  always_comb begin
    dhat = '0;
    for (int i = 0; i < C_MAX; i++)
      if (used[i]) dhat += 64'(w[i]) * 64'(u[i]);
    v  = dhat + ((64'($signed({1'b0, sigma})) - 64'(4 * SMID)) <<< omega);
    // modR: wrap to an r-bit two's complement value
    m  = v & ((64'sd1 <<< r) - 64'sd1);
    if (m[r-1]) m = m - (64'sd1 <<< r);
    hi = m + (64'(SMID) <<< (omega + 2)) + (64'sd1 <<< (omega + 1));
    if (hi < 0) hi = '0;
    if (hi > ((64'(SMAX) <<< (omega + 2)) + (64'sd1 <<< (omega + 1))))
      hi = (64'(SMAX) <<< (omega + 2)) + (64'sd1 <<< (omega + 1));
    s_chk = hi;
    if (!t_zero)                 til = (D+2)'(hi >>> (omega + 1));
    else if (p != 0 && z != 0)   til = {1'b0, s_prev_band, 1'b0};
    else                         til = {1'b0, SMID, 1'b0};
    s_til = til;
    s_hat = til[D:1];
  end

  // weight update
  always_comb begin
    logic signed [63:0] a, d, nw, wmax, wmin;
    wmax = (64'sd1 <<< (omega + 2)) - 64'sd1;
    wmin = -(64'sd1 <<< (omega + 2));
    for (int i = 0; i < C_MAX; i++) begin
      a = (err >= 0) ? 64'(u[i]) : -64'(u[i]);
      if (rho >= 0) d = (a + (64'sd1 <<< rho)) >>> (rho + 1);
      else          d = ((a <<< (-rho)) + 64'sd1) >>> 1;
      nw = 64'(w[i]) + d;
      if (nw > wmax) nw = wmax;
      if (nw < wmin) nw = wmin;
      w_next[i] = used[i] ? weight_t'(nw) : w[i];
    end
  end
endmodule
