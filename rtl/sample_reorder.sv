// sample_reorder: converts band-interleaved-by-pixel (BIP) input into
// band-interleaved-by-line (BIL) order for the predictor.
//
// One image line holds Nx pixels of Nz bands. BIP delivers them pixel by
// pixel (all bands of x=0, then x=1, ...); BIL wants them band by band (all
// columns of band 0, then band 1, ...). Two line buffers of NX*NZ samples
// are used in ping-pong: one is filled in BIP order at entry z*NX + x while
// the other is read out in BIL order, so the stream runs at one sample per
// cycle on both sides after a latency of one line. Synchronous read; the
// read data register is the output stage (valid/ready). start clears both
// buffers' state before an image; input is accepted from start until the
// last of the ny lines has been written. nx, ny and nz must stay stable
// during an image.
module sample_reorder
  import ccsds_pkg::*;
#(
  parameter int unsigned NX = NX_MAX,
  parameter int unsigned NZ = NZ_MAX
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [XW:0]  nx,
  input  logic [YW:0]  ny,
  input  logic [ZW:0]  nz,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [D-1:0] in_sample,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [D-1:0] out_sample
);
  localparam int unsigned DEPTH = NX * NZ;
  localparam int unsigned AW = $clog2(DEPTH);

  logic [D-1:0] mem0 [DEPTH];
  logic [D-1:0] mem1 [DEPTH];
  logic [1:0]   full;                 // bank holds a complete line
  logic         wb, rb;               // bank being written / read
  logic [XW-1:0] wx, rx;
  logic [ZW-1:0] wz, rz;
  logic [AW-1:0] wa, ra;
  logic [YW-1:0] wy;
  logic push, rd_en, active;

  assign wa = AW'(wz * NX + wx);
  assign ra = AW'(rz * NX + rx);
  assign in_ready = active && !full[wb];
  assign push     = in_valid && in_ready;
  assign rd_en    = full[rb] && (!out_valid || out_ready);

  always_ff @(posedge clk) begin
    if (push && !wb) mem0[wa] <= in_sample;
    if (push &&  wb) mem1[wa] <= in_sample;
    if (rd_en) out_sample <= rb ? mem1[ra] : mem0[ra];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full <= '0; wb <= 1'b0; rb <= 1'b0;
      wx <= '0; wz <= '0; rx <= '0; rz <= '0; out_valid <= 1'b0;
      wy <= '0; active <= 1'b0;
    end else if (start) begin
      full <= '0; wb <= 1'b0; rb <= 1'b0;
      wx <= '0; wz <= '0; rx <= '0; rz <= '0; out_valid <= 1'b0;
      wy <= '0; active <= 1'b1;
    end else begin
      logic [1:0] f;
      f = full;
      // write side: BIP, band index fastest
      if (push) begin
        if ((ZW+1)'(wz) != nz - 1'b1) wz <= wz + 1'b1;
        else begin
          wz <= '0;
          if ((XW+1)'(wx) != nx - 1'b1) wx <= wx + 1'b1;
          else begin
            wx <= '0;
            f[wb] = 1'b1;
            wb <= !wb;
            wy <= wy + 1'b1;
            if ((YW+1)'(wy) == ny - 1'b1) active <= 1'b0;
          end
        end
      end
      // read side: BIL, column index fastest
      if (rd_en) begin
        if ((XW+1)'(rx) != nx - 1'b1) rx <= rx + 1'b1;
        else begin
          rx <= '0;
          if ((ZW+1)'(rz) != nz - 1'b1) rz <= rz + 1'b1;
          else begin
            rz <= '0;
            f[rb] = 1'b0;
            rb <= !rb;
          end
        end
      end
      full <= f;
      if (rd_en) out_valid <= 1'b1;
      else if (out_ready) out_valid <= 1'b0;
    end
  end
endmodule
