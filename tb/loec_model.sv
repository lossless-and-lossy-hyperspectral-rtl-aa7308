// loec_model: stand-in for the low-entropy coder of the hybrid entropy coder,
// for simulation only.
//
// The real coder uses the sixteen variable-to-variable code tables of the
// CCSDS 123.0-B-2 standard. This model only has the same ports and handshake:
// it takes low-entropy samples with random back-pressure and answers each one,
// after a random delay and in order, with a 4-bit codeword holding the code
// index; on a flush request it sends one 3-bit codeword 101 and then raises
// flush_done. The testbench reference (ccsds_ref_pkg) models the same
// behaviour.
module loec_model
  import ccsds_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            lo_valid,
  output logic            lo_ready,
  input  logic [3:0]      lo_code,
  output logic            lo_cw_valid,
  input  logic            lo_cw_ready,
  output logic [CW_W-1:0] lo_cw,
  output logic [CL_W-1:0] lo_len,
  input  logic            lo_flush_req,
  output logic            lo_fl_valid,
  input  logic            lo_fl_ready,
  output logic [CW_W-1:0] lo_fl_cw,
  output logic [CL_W-1:0] lo_fl_len,
  output logic            lo_flush_done,
  output int              stalls
);
  logic [3:0] q[$];
  logic       flushed;

  assign lo_cw     = CW_W'(q.size() > 0 ? q[0] : 4'd0);
  assign lo_len    = CL_W'(4);
  assign lo_fl_cw  = CW_W'(3'b101);
  assign lo_fl_len = CL_W'(3);

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lo_ready <= 1'b0; lo_cw_valid <= 1'b0; lo_fl_valid <= 1'b0;
      lo_flush_done <= 1'b0; flushed <= 1'b0; stalls <= 0;
      q.delete();
    end else begin
      if (lo_valid && lo_ready) q.push_back(lo_code);
      if (lo_valid && !lo_ready) stalls <= stalls + 1;
      lo_ready <= ($urandom_range(0, 3) != 0);
      if (lo_cw_valid && lo_cw_ready) begin
        void'(q.pop_front());
        lo_cw_valid <= 1'b0;
      end else if (q.size() > 0 && $urandom_range(0, 1) == 1) begin
        lo_cw_valid <= 1'b1;
      end
      if (!lo_flush_req) begin
        flushed <= 1'b0; lo_flush_done <= 1'b0; lo_fl_valid <= 1'b0;
      end else if (lo_fl_valid && lo_fl_ready) begin
        lo_fl_valid <= 1'b0; lo_flush_done <= 1'b1; flushed <= 1'b1;
      end else if (!flushed) begin
        lo_fl_valid <= 1'b1;
      end
    end
  end
endmodule
