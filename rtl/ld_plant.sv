// ld_plant -- second-order digital filter modelling the controlled plant.
//
// Implements y(k) = a0 x(k) + a1 x(k-1) + a2 x(k-2) - b1 y(k-1) - b2 y(k-2).
// The defaults are the backward-rule discretisation, at T = 0.01 s, of the
// DC servomotor 1/(0.02 s^2 + s): a0 = 0.0033, a1 = a2 = 0, b1 = -1.667,
// b2 = 0.667. The terms that depend on past samples form the "adding
// factor", computed from the state registers; on each enabled clock edge
// the new output a0 x(k) + adding factor is stored and the history shifts.
// All multiplications are by constants.
//
// Interface: x_i is the controller output (20 bit signed, 12 fraction
// bits); y_o is the newest registered plant output and y_prev_o is the
// output one sample (of the same stream) before it, both 24 bit signed with
// 16 fraction bits. Products are truncated toward
// minus infinity; the coefficients have 16 fraction bits, with b1 and b2
// chosen so that 1 + b1 + b2 is exactly zero and the integrator in the
// plant does not drift. The register form of the adding factor (here
// recomputed each cycle from the stored history) is this design's choice.
// INTERLEAVE = C > 1 turns the filter into C independent filters sharing
// one datapath, taking samples in turn (C-slow operation): every delay of
// one sample becomes C enabled clocks, so y(k-1) of a stream is the output
// stored C samples earlier. The pipelined control loop uses C = 4, one
// stream per pipeline stage. The delay lines of x and y hold 2C samples.
// All registers reset to zero.
module ld_plant
  import ld_pkg::*;
#(
  parameter coef_t A0 = A0_Q,
  parameter coef_t A1 = A1_Q,
  parameter coef_t A2 = A2_Q,
  parameter coef_t B1 = B1_Q,
  parameter coef_t B2 = B2_Q,
  parameter int unsigned INTERLEAVE = 1     // independent interleaved streams
) (
  input  logic     clk_i,
  input  logic     rst_ni,
  input  logic     en_i,        // take one sample
  input  ctl_out_t x_i,         // x(k)
  output y_t       y_o,         // y(k) after the edge
  output y_t       y_prev_o,    // y(k-1) of the same stream
  output y_t       y_next_o     // value y_o takes at the next enabled edge
);

  localparam int unsigned PW = Y_W + COEF_W;

  localparam int unsigned C = INTERLEAVE;

  ctl_out_t xh [2*C];           // xh[m] = the input stored m+1 samples ago
  y_t       yh [2*C];           // yh[m] = the output stored m+1 samples ago
  ctl_out_t x1, x2;             // x(k-1), x(k-2) of this stream
  y_t       y1, y2;             // y(k-1), y(k-2) of this stream

  assign x1 = xh[C-1];
  assign x2 = xh[2*C-1];
  assign y1 = yh[C-1];
  assign y2 = yh[2*C-1];

  logic signed [PW-1:0] p_a0, p_a1, p_a2, p_b1, p_b2, af, sum;

  always_comb begin
    // x terms carry 12 + 16 fraction bits, y terms 16 + 16
    p_a0 = (PW'(x_i) * PW'(A0)) >>> (OUT_FRAC + COEF_FRAC - Y_FRAC);
    p_a1 = (PW'(x1)  * PW'(A1)) >>> (OUT_FRAC + COEF_FRAC - Y_FRAC);
    p_a2 = (PW'(x2)  * PW'(A2)) >>> (OUT_FRAC + COEF_FRAC - Y_FRAC);
    p_b1 = (PW'(y1)  * PW'(B1)) >>> COEF_FRAC;
    p_b2 = (PW'(y2)  * PW'(B2)) >>> COEF_FRAC;
    af   = p_a1 + p_a2 - p_b1 - p_b2;          // adding factor
    sum  = p_a0 + af;
  end

  assign y_next_o = y_t'(sum);
  assign y_o      = yh[0];      // newest output
  assign y_prev_o = yh[C];      // same stream, one sample earlier

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int m = 0; m < 2*C; m++) begin
        xh[m] <= '0;
        yh[m] <= '0;
      end
    end else if (en_i) begin
      xh[0] <= x_i;
      yh[0] <= y_next_o;
      for (int m = 1; m < 2*C; m++) begin
        xh[m] <= xh[m-1];
        yh[m] <= yh[m-1];
      end
    end
  end

endmodule
