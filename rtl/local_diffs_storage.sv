// local_diffs_storage: central local differences of the previous P bands, per
// column.
//
// In BIL order band z-1 of column x was processed one line-band earlier, so an
// entry per column holding the last P central differences of that column is
// all the spectral part of the prediction needs. Reading column x returns
// {d_(z-1), d_(z-2), ...}; writing pushes the new central difference d_z in
// front and drops the oldest one. Synchronous read (data valid the cycle after
// rd_en), one write port. The arrangement is this design's choice.
module local_diffs_storage
  import ccsds_pkg::*;
#(
  parameter int unsigned NX = NX_MAX
) (
  input  logic           clk,
  input  logic           rd_en,
  input  logic [XW-1:0]  rd_x,
  output cdiff_vec_t     rd_data,
  input  logic           wr_en,
  input  logic [XW-1:0]  wr_x,
  input  cdiff_vec_t     wr_prev,   // vector read for this column
  input  ldiff_t         wr_dc      // new central difference
);
  cdiff_vec_t mem [NX];
  cdiff_vec_t shifted;

  always_comb begin
    shifted[0] = wr_dc;
    for (int i = 1; i < P_MAX; i++) shifted[i] = wr_prev[i-1];
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_x] <= shifted;
    if (rd_en) rd_data <= mem[rd_x];
  end
endmodule
