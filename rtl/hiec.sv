// hiec: high-entropy coder of the hybrid entropy coder.
//
// Combinational. Chooses the code parameter k as the largest value up to
// max(D-2, 2) with Gamma * 2^(k+2) <= Sigma~ + floor(49*Gamma / 2^5), and
// writes delta as a reversed Golomb power-of-two codeword: the k low bits of
// delta, a '1', then floor(delta/2^k) zeros. When floor(delta/2^k) reaches
// the unary length limit Umax the codeword is instead delta in D bits followed
// by Umax zeros. The first sample of a band is written as D plain bits.
// The codeword is right-aligned in cw; the first bit to send is bit len-1.
module hiec
  import ccsds_pkg::*;
(
  input  logic             first,
  input  logic [D-1:0]     delta,
  input  logic [CNTW-1:0]  cnt,
  input  logic [ACCW-1:0]  acc,
  input  logic [5:0]       umax,
  output logic [4:0]       k,
  output logic [CW_W-1:0]  cw,
  output logic [CL_W-1:0]  len
);
  localparam int unsigned KMAX = (D - 2 > 2) ? D - 2 : 2;

  always_comb begin
    logic [ACCW+KMAX+3:0] rhs;
    logic [D-1:0] u;
    rhs = (ACCW+KMAX+4)'(acc) + (((ACCW+KMAX+4)'(cnt) * 49) >> 5);
    k = '0;
    for (int i = 0; i <= int'(KMAX); i++)
      if (((ACCW+KMAX+4)'(cnt) << (i + 2)) <= rhs) k = 5'(i);
    u = delta >> k;
    if (first) begin
      cw  = CW_W'(delta);
      len = CL_W'(D);
    end else if (u < D'(umax)) begin
      cw  = (CW_W'(delta & D'((1 << k) - 1)) << (u + 1)) | (CW_W'(1) << u);
      len = CL_W'(k) + CL_W'(u) + 1'b1;
    end else begin
      cw  = CW_W'(delta) << umax;
      len = CL_W'(D) + CL_W'(umax);
    end
  end
endmodule
