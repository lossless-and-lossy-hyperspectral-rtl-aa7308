// acss: adaptive code selection statistics of the hybrid entropy coder.
//
// Keeps, for every band, the counter Gamma and the high-resolution
// accumulator Sigma~. For the first sample of a band (t = 0) they are set to
// 2^gamma0 and acc_init. For every later sample delta:
//   Gamma(t-1) <  2^gstar - 1:  Sigma~ += 4*delta,              Gamma += 1
//   otherwise (rescaling):      Sigma~ = floor((Sigma~ + 4*delta + 1)/2),
//                               Gamma = floor((Gamma + 1)/2)
// and on rescaling the bit that is dropped, the LSB of Sigma~ + 4*delta, is
// passed on as a flag so that it can be written to the bitstream. The
// statistics sent downstream are the updated ones, Gamma(t) and Sigma~(t).
//
// In BIL order a band's statistics are used for a whole line, so the current
// band is held in registers (one sample per cycle) and written through to a
// per-band array; switching to another band costs two cycles to read its
// entry. The flush port reads the final accumulator of a band. Output is a
// registered valid/ready stage.
module acss
  import ccsds_pkg::*;
#(
  parameter int unsigned NZ = NZ_MAX
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [3:0]       gamma0,
  input  logic [3:0]       gstar,
  input  logic [ACCW-1:0]  acc_init,
  input  logic             in_valid,
  output logic             in_ready,
  input  mapped_t          in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output mapped_t          out_data,
  output logic [CNTW-1:0]  out_cnt,
  output logic [ACCW-1:0]  out_acc,
  output logic             out_resc,
  output logic             out_resc_bit,
  // final accumulator read-out for the image tail
  input  logic             fl_rd_en,
  input  logic [ZW-1:0]    fl_rd_z,
  output logic [ACCW-1:0]  fl_rd_acc
);
  logic [ACCW-1:0] acc_mem [NZ];
  logic [CNTW-1:0] cnt_mem [NZ];

  logic            cur_valid, loading;
  logic [ZW-1:0]   cur_z;
  logic [ACCW-1:0] cur_acc, ld_acc;
  logic [CNTW-1:0] cur_cnt, ld_cnt;

  logic hit, take, stage_free;
  logic [ACCW:0]   sum;
  logic [ACCW-1:0] nacc;
  logic [CNTW-1:0] ncnt;
  logic            resc;

  assign hit        = in_data.first || (cur_valid && cur_z == in_data.z);
  assign stage_free = !out_valid || out_ready;
  assign in_ready   = stage_free && hit && !loading;
  assign take       = in_valid && in_ready;

  always_comb begin
    sum  = (ACCW+1)'(cur_acc) + ((ACCW+1)'(in_data.delta) << 2);
    resc = ((CNTW+1)'(cur_cnt) >= ((CNTW+1)'(1) << gstar) - 1'b1);
    if (in_data.first) begin
      nacc = acc_init;
      ncnt = CNTW'(1 << gamma0);
      resc = 1'b0;
    end else if (!resc) begin
      nacc = ACCW'(sum);
      ncnt = cur_cnt + 1'b1;
    end else begin
      nacc = ACCW'((sum + 1'b1) >> 1);
      ncnt = CNTW'(((CNTW+1)'(cur_cnt) + 1'b1) >> 1);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_valid <= 1'b0; loading <= 1'b0; cur_z <= '0; cur_acc <= '0; cur_cnt <= '0;
      out_valid <= 1'b0; out_data <= '0; out_cnt <= '0; out_acc <= '0;
      out_resc <= 1'b0; out_resc_bit <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (loading) begin
        loading   <= 1'b0;
        cur_valid <= 1'b1;
        cur_acc   <= ld_acc;
        cur_cnt   <= ld_cnt;
      end else if (in_valid && !hit && stage_free) begin
        loading <= 1'b1;                 // fetch the band's statistics
        cur_z   <= in_data.z;
      end else if (take) begin
        cur_valid    <= 1'b1;
        cur_z        <= in_data.z;
        cur_acc      <= nacc;
        cur_cnt      <= ncnt;
        out_valid    <= 1'b1;
        out_data     <= in_data;
        out_acc      <= nacc;
        out_cnt      <= ncnt;
        out_resc     <= resc;
        out_resc_bit <= sum[0];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (take) begin
      acc_mem[in_data.z] <= nacc;
      cnt_mem[in_data.z] <= ncnt;
    end
    if (in_valid && !hit) begin
      ld_acc <= acc_mem[in_data.z];
      ld_cnt <= cnt_mem[in_data.z];
    end
    if (fl_rd_en) fl_rd_acc <= acc_mem[fl_rd_z];
  end
endmodule
