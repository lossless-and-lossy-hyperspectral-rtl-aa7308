// entropy_decision: high/low entropy decision of the hybrid entropy coder.
//
// Combinational. A sample is high-entropy when Sigma~(t) * 2^14 >= T_0 *
// Gamma(t); otherwise the low-entropy code index is the largest i with
// Sigma~(t) * 2^14 < T_i * Gamma(t), using the sixteen code selection
// thresholds of the package. The first sample of a band is always routed to
// the high-entropy coder, which writes it uncoded.
module entropy_decision
  import ccsds_pkg::*;
(
  input  logic             first,
  input  logic [CNTW-1:0]  cnt,
  input  logic [ACCW-1:0]  acc,
  output logic             high,
  output logic [3:0]       code_idx
);
  logic [ACCW+14:0] lhs;
  assign lhs = (ACCW+15)'(acc) << 14;

  always_comb begin
    code_idx = '0;
    for (int i = 0; i < NCODES; i++)
      if (lhs < (ACCW+15)'(code_threshold(i)) * (ACCW+15)'(cnt)) code_idx = 4'(i);
    high = first || (lhs >= (ACCW+15)'(code_threshold(0)) * (ACCW+15)'(cnt));
  end
endmodule
