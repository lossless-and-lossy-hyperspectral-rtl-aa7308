// code_combiner: merges the codewords of the two coders in sample order.
//
// Pops one order tag per sample. For a high-entropy tag it takes the head of
// the high-entropy codeword FIFO, for a low-entropy tag the low-entropy
// coder's response for that sample (which may be empty, length 0). A
// rescaling bit, when the tag carries one, is placed in front of the
// codeword. The result is a registered codeword/length output with
// valid/ready; last_out marks the codeword of the image's last sample.
module code_combiner
  import ccsds_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            tag_valid,
  output logic            tag_ready,
  input  hyb_tag_t        tag,
  input  logic            hi_valid,
  output logic            hi_ready,
  input  logic [CW_W-1:0] hi_cw,
  input  logic [CL_W-1:0] hi_len,
  input  logic            lo_valid,
  output logic            lo_ready,
  input  logic [CW_W-1:0] lo_cw,
  input  logic [CL_W-1:0] lo_len,
  output logic            out_valid,
  input  logic            out_ready,
  output logic [CW_W-1:0] out_cw,
  output logic [CL_W-1:0] out_len,
  output logic            out_last
);
  logic src_valid, go;
  logic [CW_W-1:0] cw;
  logic [CL_W-1:0] len;

  assign src_valid = tag.high ? hi_valid : lo_valid;
  assign go        = tag_valid && src_valid && (!out_valid || out_ready);
  assign tag_ready = go;
  assign hi_ready  = go && tag.high;
  assign lo_ready  = go && !tag.high;

  always_comb begin
    cw  = tag.high ? hi_cw : lo_cw;
    len = tag.high ? hi_len : lo_len;
    if (tag.resc) begin
      cw  = cw | (CW_W'(tag.resc_bit) << len);
      len = len + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_cw <= '0; out_len <= '0; out_last <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (go) begin
        out_valid <= 1'b1;
        out_cw    <= cw;
        out_len   <= len;
        out_last  <= tag.last;
      end
    end
  end
endmodule
