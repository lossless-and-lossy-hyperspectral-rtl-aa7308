// neighbour_storage: sample representatives of one image line for every band.
//
// In BIL order the neighbours N, NE (and, through a register in the predictor,
// NW) of sample (x,y,z) come from row y-1 of band z, written Nx*Nz samples
// earlier. Entry z*NX + x holds the latest representative of column x of band
// z: the predictor reads it before overwriting it with the current row's value,
// so the same array also serves the narrow local sums, which read (x-1,y) of
// band z-1 on the first row. One synchronous read port (data valid the cycle
// after rd_en) and one write port. The size follows the maximum image
// dimensions; the addressing is this design's choice.
module neighbour_storage
  import ccsds_pkg::*;
#(
  parameter int unsigned NX = NX_MAX,
  parameter int unsigned NZ = NZ_MAX
) (
  input  logic              clk,
  input  logic              rd_en,
  input  logic [ZW-1:0]     rd_z,
  input  logic [XW-1:0]     rd_x,
  output logic [D-1:0]      rd_data,
  input  logic              wr_en,
  input  logic [ZW-1:0]     wr_z,
  input  logic [XW-1:0]     wr_x,
  input  logic [D-1:0]      wr_data
);
  localparam int unsigned DEPTH = NX * NZ;
  localparam int unsigned AW = $clog2(DEPTH);

  logic [D-1:0] mem [DEPTH];
  logic [AW-1:0] ra, wa;

  assign ra = AW'(rd_z * NX + rd_x);
  assign wa = AW'(wr_z * NX + wr_x);

  always_ff @(posedge clk) begin
    if (wr_en) mem[wa] <= wr_data;
    if (rd_en) rd_data <= mem[ra];
  end
endmodule
