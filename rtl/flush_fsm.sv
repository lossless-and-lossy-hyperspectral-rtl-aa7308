// flush_fsm: output stage of the hybrid entropy coder that appends the image
// tail.
//
// While the image is coded it forwards the code combiner's codewords. After
// the codeword of the last sample it
//   1. asks the low-entropy coder to flush its open codes (lo_flush_req) and
//      forwards the flush codewords until lo_flush_done,
//   2. reads the final accumulator Sigma~_z(NxNy-1) of every band from the
//      statistics unit and writes each in 2 + D + gstar bits, band 0 first,
//   3. writes a single '1' bit flagged with out_end, after which the output
//      packer fills the last word with zeros.
// Output is a registered codeword/length stage with valid/ready.
module flush_fsm
  import ccsds_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic [ZW:0]     nz,
  input  logic [3:0]      gstar,
  // codewords from the code combiner
  input  logic            in_valid,
  output logic            in_ready,
  input  logic [CW_W-1:0] in_cw,
  input  logic [CL_W-1:0] in_len,
  input  logic            in_last,
  // low-entropy coder flush
  output logic            lo_flush_req,
  input  logic            lo_fl_valid,
  output logic            lo_fl_ready,
  input  logic [CW_W-1:0] lo_fl_cw,
  input  logic [CL_W-1:0] lo_fl_len,
  input  logic            lo_flush_done,
  // accumulator read-out
  output logic            acc_rd_en,
  output logic [ZW-1:0]   acc_rd_z,
  input  logic [ACCW-1:0] acc_rd_data,
  // output
  output logic            out_valid,
  input  logic            out_ready,
  output logic [CW_W-1:0] out_cw,
  output logic [CL_W-1:0] out_len,
  output logic            out_end,
  output logic            tail_active
);
  typedef enum logic [2:0] { FL_RUN, FL_LOFLUSH, FL_RD, FL_ACC, FL_ONE, FL_WAIT } fl_state_e;
  fl_state_e st;
  logic [ZW:0] zc;
  logic free;

  assign free        = !out_valid || out_ready;
  assign in_ready    = (st == FL_RUN) && free;
  assign lo_flush_req = (st == FL_LOFLUSH);
  assign lo_fl_ready = (st == FL_LOFLUSH) && free;
  assign acc_rd_en   = (st == FL_RD);
  assign acc_rd_z    = ZW'(zc);
  assign tail_active = (st != FL_RUN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= FL_RUN; zc <= '0;
      out_valid <= 1'b0; out_cw <= '0; out_len <= '0; out_end <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      unique case (st)
        FL_RUN: if (in_valid && free) begin
          out_valid <= 1'b1; out_cw <= in_cw; out_len <= in_len; out_end <= 1'b0;
          if (in_last) st <= FL_LOFLUSH;
        end
        FL_LOFLUSH: begin
          if (lo_fl_valid && free) begin
            out_valid <= 1'b1; out_cw <= lo_fl_cw; out_len <= lo_fl_len; out_end <= 1'b0;
          end else if (lo_flush_done && !lo_fl_valid) begin
            st <= FL_RD; zc <= '0;
          end
        end
        FL_RD: st <= FL_ACC;                      // accumulator read latency
        FL_ACC: if (free) begin
          out_valid <= 1'b1;
          out_cw    <= CW_W'(acc_rd_data);
          out_len   <= CL_W'(2 + D) + CL_W'(gstar);
          out_end   <= 1'b0;
          if (zc == nz - 1'b1) st <= FL_ONE;
          else begin zc <= zc + 1'b1; st <= FL_RD; end
        end
        FL_ONE: if (free) begin
          out_valid <= 1'b1; out_cw <= CW_W'(1); out_len <= CL_W'(1); out_end <= 1'b1;
          st <= FL_WAIT;
        end
        default: if (free) st <= FL_RUN;          // last word accepted
      endcase
    end
  end
endmodule
