// tb_predictor_ctrl: drives the control unit through a small image with
// random input, division and output delays; checks the BIL coordinate order,
// t = y*Nx + x, the edge flags, the step sequence of every sample and the
// done pulse after the last sample.
module tb_predictor_ctrl;
  import ccsds_pkg::*;
  logic clk = 0, rst_n = 0; always #5 clk = ~clk;
  logic start, in_valid, q_done, m_done, out_ready;
  logic [XW:0] nx; logic [YW:0] ny; logic [ZW:0] nz;
  pstate_e state;
  logic [XW-1:0] x; logic [YW-1:0] y; logic [ZW-1:0] z; logic [TW-1:0] t;
  logic x_first, x_last, y_first, z_first, t_zero, last, in_ready, out_valid, busy, done;
  int checks = 0, failures = 0;

  predictor_ctrl dut (.*);

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int ex, ey, ez, n, ndone;
    pstate_e prev;
    start = 0; in_valid = 0; q_done = 0; m_done = 0; out_ready = 0;
    nx = 5; ny = 3; nz = 4;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    ex = 0; ey = 0; ez = 0; n = 0; ndone = 0; prev = PS_IDLE;
    while (n < 60) begin
      in_valid  = ($urandom_range(0, 2) == 0);
      q_done    = (state == PS_QW) && ($urandom_range(0, 2) == 0);
      m_done    = (state == PS_MW) && ($urandom_range(0, 2) == 0);
      out_ready = ($urandom_range(0, 2) == 0);
      #1;
      if (state == PS_OUT && out_ready) begin
        checks++;
        if (int'(x) != ex || int'(y) != ey || int'(z) != ez || int'(t) != ey*5 + ex ||
            x_first != (ex == 0) || x_last != (ex == 4) || y_first != (ey == 0) ||
            z_first != (ez == 0) || t_zero != (ex == 0 && ey == 0) || last != (n == 59)) begin
          failures++;
          if (failures < 5) $display("sample %0d: x%0d y%0d z%0d t%0d", n, x, y, z, t);
        end
        n++;
        ex++;
        if (ex == 5) begin ex = 0; ez++; if (ez == 4) begin ez = 0; ey++; end end
      end
      @(negedge clk);
      if (done) ndone++;
      // each state may only follow its predecessor in the schedule
      if (state != prev) begin
        checks++;
        case (state)
          PS_F1: if (prev != PS_IN) failures++;
          PS_F2: if (prev != PS_F1) failures++;
          PS_F3: if (prev != PS_F2) failures++;
          PS_LS: if (prev != PS_F3) failures++;
          PS_PRED: if (prev != PS_LS) failures++;
          PS_Q: if (prev != PS_PRED) failures++;
          PS_QW: if (prev != PS_Q) failures++;
          PS_MAP: if (prev != PS_QW) failures++;
          PS_MW: if (prev != PS_MAP) failures++;
          PS_OUT: if (prev != PS_MW) failures++;
          PS_IN: if (prev != PS_OUT && prev != PS_IDLE) failures++;
          default: ;
        endcase
        prev = state;
      end
    end
    @(negedge clk);
    checks++;
    if (ndone != 1 || busy) begin failures++; $display("done %0d busy %0d", ndone, busy); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
