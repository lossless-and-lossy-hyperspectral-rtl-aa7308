// rho_update: weight update scaling exponent of CCSDS 123.0-B-2.
//
//   rho(t) = clip(vmin + floor((t - Nx) / 2^tinc), vmin, vmax) + D - omega
//
// Combinational; the result is signed because a negative exponent means the
// weight update is scaled up instead of down.
module rho_update
  import ccsds_pkg::*;
(
  input  logic [TW-1:0]      t,
  input  logic [XW:0]        nx,
  input  logic signed [4:0]  vmin,
  input  logic signed [4:0]  vmax,
  input  logic [3:0]         tinc,
  input  logic [4:0]         omega,
  output logic signed [6:0]  rho
);
  logic signed [TW+1:0] dt, q;
  logic signed [TW+1:0] e;
  always_comb begin
    dt  = $signed({2'b00, t}) - $signed((TW+2)'(nx));
    q   = dt >>> tinc;                       // floor division by 2^tinc
    e   = q + (TW+2)'(vmin);
    if (e < (TW+2)'(vmin)) e = (TW+2)'(vmin);
    if (e > (TW+2)'(vmax)) e = (TW+2)'(vmax);
    rho = 7'(e) + 7'(D) - 7'($signed({2'b00, omega}));
  end
endmodule
