// predictor_ctrl: control unit of the prediction block (serial schedule).
//
// Walks the image in BIL order (x fastest, then band z, then row y) and steps
// every sample through a fixed sequence: accept the input sample (PS_IN),
// three synchronous reads of the neighbour storage (PS_F1..PS_F3), local sums
// and differences (PS_LS), prediction (PS_PRED), quantizer start and wait
// (PS_Q, PS_QW), mapper start and wait (PS_MAP, PS_MW) and hand-over with
// write-back (PS_OUT). A sample is fully processed before the next is
// accepted, as in the baseline operation mode, which supports every predictor
// configuration. t = y*Nx + x is kept alongside the coordinates. start is
// accepted in PS_IDLE; done pulses after the last sample is handed over.
module predictor_ctrl
  import ccsds_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [XW:0]    nx,
  input  logic [YW:0]    ny,
  input  logic [ZW:0]    nz,
  input  logic           in_valid,
  input  logic           q_done,
  input  logic           m_done,
  input  logic           out_ready,
  output pstate_e        state,
  output logic [XW-1:0]  x,
  output logic [YW-1:0]  y,
  output logic [ZW-1:0]  z,
  output logic [TW-1:0]  t,
  output logic           x_first,
  output logic           x_last,
  output logic           y_first,
  output logic           z_first,
  output logic           t_zero,
  output logic           last,      // current sample is the image's last
  output logic           in_ready,
  output logic           out_valid,
  output logic           busy,
  output logic           done
);
  logic [TW-1:0] t_line;

  assign x_first  = (x == 0);
  assign x_last   = ((XW+1)'(x) == nx - 1'b1);
  assign y_first  = (y == 0);
  assign z_first  = (z == 0);
  assign t_zero   = x_first && y_first;
  assign t        = t_line + TW'(x);
  assign last     = x_last && ((ZW+1)'(z) == nz - 1'b1) && ((YW+1)'(y) == ny - 1'b1);
  assign in_ready = (state == PS_IN);
  assign out_valid = (state == PS_OUT);
  assign busy     = (state != PS_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= PS_IDLE; x <= '0; y <= '0; z <= '0; t_line <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        PS_IDLE: if (start) begin
          state <= PS_IN; x <= '0; y <= '0; z <= '0; t_line <= '0;
        end
        PS_IN:   if (in_valid) state <= PS_F1;
        PS_F1:   state <= PS_F2;
        PS_F2:   state <= PS_F3;
        PS_F3:   state <= PS_LS;
        PS_LS:   state <= PS_PRED;
        PS_PRED: state <= PS_Q;
        PS_Q:    state <= PS_QW;
        PS_QW:   if (q_done) state <= PS_MAP;
        PS_MAP:  state <= PS_MW;
        PS_MW:   if (m_done) state <= PS_OUT;
        PS_OUT:  if (out_ready) begin
          if (last) begin
            state <= PS_IDLE;
            done  <= 1'b1;
          end else begin
            state <= PS_IN;
            if (!x_last) x <= x + 1'b1;
            else begin
              x <= '0;
              if ((ZW+1)'(z) != nz - 1'b1) z <= z + 1'b1;
              else begin
                z <= '0;
                y <= y + 1'b1;
                t_line <= t_line + TW'(nx);
              end
            end
          end
        end
        default: state <= PS_IDLE;
      endcase
    end
  end

  // An accepted sample always moves on to the first fetch step.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state == PS_IN && in_valid) |=> (state == PS_F1));
endmodule
