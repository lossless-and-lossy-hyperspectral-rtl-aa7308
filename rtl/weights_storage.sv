// weights_storage: weight vector of every band.
//
// In BIL order the weights of band z are used for one line, then those of the
// next band, so each band's vector is parked here between lines. A write with
// init = 1 stores the default initial weights of the standard instead of
// wr_data: spectral weight 1 is floor(7/8 * 2^omega), each further spectral
// weight is 1/8 of the previous one (only for the min(z,P) bands that exist),
// directional weights are 0. Synchronous read, one write port.
module weights_storage
  import ccsds_pkg::*;
#(
  parameter int unsigned NZ = NZ_MAX
) (
  input  logic           clk,
  input  logic [4:0]     omega,
  input  logic [1:0]     p,
  input  logic           rd_en,
  input  logic [ZW-1:0]  rd_z,
  output wvec_t          rd_data,
  input  logic           wr_en,
  input  logic           init,
  input  logic [ZW-1:0]  wr_z,
  input  wvec_t          wr_data
);
  wvec_t mem [NZ];
  wvec_t init_vec;

  always_comb begin
    logic signed [WW:0] v;
    init_vec = '0;
    v = (WW+1)'((7 << omega) >> 3);
    for (int i = 0; i < P_MAX; i++) begin
      if (i < int'(p) && i < int'(wr_z)) init_vec[3+i] = weight_t'(v);
      v = v >>> 3;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_z] <= init ? init_vec : wr_data;
    if (rd_en) rd_data <= mem[rd_z];
  end
endmodule
