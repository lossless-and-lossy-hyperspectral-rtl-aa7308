// iter_div: iterative unsigned restoring divider, STEP quotient bits per cycle.
//
// start loads the numerator and divisor; done pulses once ceil(NW/STEP) cycles
// later with quot = floor(num/den) and rem = num mod den. A zero divisor gives
// an all-ones quotient. STEP trades latency for the length of the
// combinational path.
module iter_div #(
  parameter int unsigned NW   = 17,
  parameter int unsigned DW   = 9,
  parameter int unsigned STEP = 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NW-1:0] num,
  input  logic [DW-1:0] den,
  output logic          busy,
  output logic          done,
  output logic [NW-1:0] quot,
  output logic [DW-1:0] rem
);
  localparam int unsigned NSTEPS = (NW + STEP - 1) / STEP;
  localparam int unsigned NP = NSTEPS * STEP;   // padded numerator width
  localparam int unsigned CW = $clog2(NSTEPS + 1);

  logic [NP-1:0] n_q, q_q;
  logic [DW-1:0] d_q, r_q;
  logic [CW-1:0] cnt;
  logic [NP-1:0] n_nx, q_nx;
  logic [DW-1:0] r_nx;

  always_comb begin
    logic [DW:0] r;
    n_nx = n_q;
    q_nx = q_q;
    r    = {1'b0, r_q};
    for (int i = 0; i < STEP; i++) begin
      r    = {r[DW-1:0], n_nx[NP-1]};
      n_nx = n_nx << 1;
      q_nx = q_nx << 1;
      if (r >= {1'b0, d_q}) begin
        r       = r - {1'b0, d_q};
        q_nx[0] = 1'b1;
      end
    end
    r_nx = r[DW-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; cnt <= '0;
      n_q <= '0; q_q <= '0; d_q <= '0; r_q <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy <= 1'b1;
        n_q  <= NP'(num);
        d_q  <= den;
        q_q  <= '0;
        r_q  <= '0;
        cnt  <= CW'(NSTEPS);
      end else if (busy) begin
        n_q <= n_nx; q_q <= q_nx; r_q <= r_nx;
        cnt <= cnt - 1'b1;
        if (cnt == 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign quot = NW'(q_q);
  assign rem  = r_q;
endmodule
