// bit_packer: packs variable-length codewords into OUT_W-bit output words.
//
// Codewords arrive right-aligned with their length; bit len-1 is sent first.
// They are appended below the bits already held in a 128-bit buffer, whose
// top OUT_W bits form the next output word, so words are filled MSB first.
// A codeword is accepted while fewer than OUT_W bits are waiting. After a
// codeword flagged in_end the remaining bits are sent in a last word padded
// with zeros, flagged out_last.
module bit_packer
  import ccsds_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [CW_W-1:0]  in_cw,
  input  logic [CL_W-1:0]  in_len,
  input  logic             in_end,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [OUT_W-1:0] out_word,
  output logic             out_last
);
  localparam int unsigned BW = 128;
  logic [BW-1:0] buffer;
  logic [7:0]    fill;
  logic          pad;

  assign in_ready  = (fill < 8'(OUT_W)) && !pad;
  assign out_valid = (fill >= 8'(OUT_W)) || (pad && fill != 0);
  assign out_word  = buffer[BW-1 -: OUT_W];
  assign out_last  = pad && fill <= 8'(OUT_W);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buffer <= '0; fill <= '0; pad <= 1'b0;
    end else begin
      logic [BW-1:0] b;
      logic [7:0]    f;
      b = buffer;
      f = fill;
      if (out_valid && out_ready) begin
        b = b << OUT_W;
        f = (f > 8'(OUT_W)) ? f - 8'(OUT_W) : 8'd0;
        if (out_last) pad <= 1'b0;
      end
      if (in_valid && in_ready) begin
        b = b | ((BW'(in_cw) & ((BW'(1) << in_len) - 1'b1)) << (8'(BW) - f - 8'(in_len)));
        f = f + 8'(in_len);
        if (in_end) pad <= 1'b1;
      end
      buffer <= b;
      fill   <= f;
    end
  end
endmodule
