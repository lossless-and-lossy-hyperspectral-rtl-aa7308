// local_diffs: directional local differences and the central local difference
// of CCSDS 123.0-B-2.
//
// Combinational. dN = 4N - sigma, dW = 4W - sigma, dNW = 4NW - sigma on rows
// after the first; in column 0 the W and NW differences use N instead; on the
// first row all three are 0. The central difference 4*s'' - sigma of the
// current sample is produced here as well once its sample representative is
// known (0 at t = 0); the predictor stores it for the following bands.
module local_diffs
  import ccsds_pkg::*;
(
  input  logic            x_first,
  input  logic            y_first,
  input  logic [LSW-1:0]  sigma,
  input  logic [D-1:0]    s_w,
  input  logic [D-1:0]    s_nw,
  input  logic [D-1:0]    s_n,
  input  logic [D-1:0]    s_rep,     // sample representative of this sample
  output ldiff_t          d_n,
  output ldiff_t          d_w,
  output ldiff_t          d_nw,
  output ldiff_t          d_c
);
  ldiff_t sg, n4, w4, nw4, c4;
  assign sg  = ldiff_t'(sigma);
  assign n4  = ldiff_t'({s_n, 2'b00});
  assign w4  = ldiff_t'({s_w, 2'b00});
  assign nw4 = ldiff_t'({s_nw, 2'b00});
  assign c4  = ldiff_t'({s_rep, 2'b00});

  always_comb begin
    if (y_first) begin
      d_n = '0; d_w = '0; d_nw = '0;
    end else begin
      d_n  = n4 - sg;
      d_w  = x_first ? (n4 - sg) : (w4 - sg);
      d_nw = x_first ? (n4 - sg) : (nw4 - sg);
    end
    d_c = (y_first && x_first) ? '0 : (c4 - sg);
  end
endmodule
