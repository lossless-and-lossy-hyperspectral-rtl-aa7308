// hyb_arbiter: dispatch arbiter of the hybrid entropy coder.
//
// Takes each sample with its statistics and decision and sends it either to
// the high-entropy path or to the low-entropy coder, while pushing an order
// tag (destination, rescaling bit, last flag) into the tag FIFO. A sample
// leaves only when both its destination and the tag FIFO can take it, so the
// code combiner later collects the codewords in sample order.
module hyb_arbiter
  import ccsds_pkg::*;
(
  input  logic        in_valid,
  output logic        in_ready,
  input  logic        high,
  input  logic        resc,
  input  logic        resc_bit,
  input  logic        last,
  output logic        hi_valid,
  input  logic        hi_ready,
  output logic        lo_valid,
  input  logic        lo_ready,
  output logic        tag_valid,
  input  logic        tag_ready,
  output hyb_tag_t    tag
);
  logic dest_ready;
  assign dest_ready = high ? hi_ready : lo_ready;
  assign in_ready   = dest_ready && tag_ready;
  assign hi_valid   = in_valid && high && tag_ready;
  assign lo_valid   = in_valid && !high && tag_ready;
  assign tag_valid  = in_valid && dest_ready;
  assign tag        = '{high: high, last: last, resc: resc, resc_bit: resc_bit};
endmodule
