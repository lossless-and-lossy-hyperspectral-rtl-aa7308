// local_sums: local sum sigma_z(t) of CCSDS 123.0-B-2 for the four local sum
// modes (wide/narrow, neighbour-/column-oriented).
//
// Purely combinational. Neighbours are sample representatives of the current
// band: W = (x-1,y), NW = (x-1,y-1), N = (x,y-1), NE = (x+1,y-1), and
// WZ1 = (x-1,y) of band z-1, which only the narrow modes use on the first row.
// The edge rules (first row, first and last column) are those of the standard;
// at t = 0 no local sum exists and the output is 0. The design assumes Nx >= 2.
module local_sums
  import ccsds_pkg::*;
(
  input  ls_mode_e          mode,
  input  logic              x_first,  // x == 0
  input  logic              x_last,   // x == Nx-1
  input  logic              y_first,  // y == 0
  input  logic              z_first,  // z == 0
  input  logic [D-1:0]      s_w,
  input  logic [D-1:0]      s_nw,
  input  logic [D-1:0]      s_n,
  input  logic [D-1:0]      s_ne,
  input  logic [D-1:0]      s_wz1,
  output logic [LSW-1:0]    sigma
);
  logic [LSW-1:0] w, nw, n, ne, wz1, mid;
  assign w   = LSW'(s_w);
  assign nw  = LSW'(s_nw);
  assign n   = LSW'(s_n);
  assign ne  = LSW'(s_ne);
  assign wz1 = LSW'(s_wz1);
  assign mid = LSW'(SMID);

  always_comb begin
    sigma = '0;
    if (y_first && x_first) begin
      sigma = '0;                              // t = 0: unused
    end else begin
      unique case (mode)
        LS_WIDE_NEIGHBOUR: begin
          if (y_first)      sigma = w << 2;
          else if (x_first) sigma = (n + ne) << 1;
          else if (x_last)  sigma = w + nw + (n << 1);
          else              sigma = w + nw + n + ne;
        end
        LS_NARROW_NEIGHBOUR: begin
          if (y_first)      sigma = z_first ? (mid << 2) : (wz1 << 2);
          else if (x_first) sigma = (n + ne) << 1;
          else if (x_last)  sigma = (nw + n) << 1;
          else              sigma = nw + (n << 1) + ne;
        end
        LS_WIDE_COLUMN: begin
          if (y_first)      sigma = w << 2;
          else              sigma = n << 2;
        end
        default: begin // LS_NARROW_COLUMN
          if (y_first)      sigma = z_first ? (mid << 2) : (wz1 << 2);
          else              sigma = n << 2;
        end
      endcase
    end
  end
endmodule
