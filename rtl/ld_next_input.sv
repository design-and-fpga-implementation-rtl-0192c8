// ld_next_input -- Next Input Calculator: controller inputs from the plant
// output.
//
//   error(k+1) = step - y(k)
//   rate(k+1)  = (error(k) - error(k+1)) * (1/T),  1/T = 100
//
// The difference is taken at the full plant precision (16 fraction bits);
// the multiplication by 100 is a constant multiplication. The controller's
// tables cover a non-negative error whose magnitude is falling, so the
// calculator folds the other half-plane onto it: when the error is negative
// it negates error and rate and raises mirror_o, and the controller negates
// its result. A rate whose error magnitude is growing (not covered by the
// tables) is clamped to 0, which is also what the first sample after a step
// sees. The error is then truncated to unsigned 2.8 and the rate to unsigned
// 6.4, both saturating at 10 bits. Folding and clamping are this design's
// choices; the formulas and formats follow the published implementation.
//
// Purely combinational. err_full_o is the signed error to be stored as the
// next sample's previous error.
module ld_next_input
  import ld_pkg::*;
(
  input  y_t                step_i,      // reference
  input  y_t                y_i,         // plant output y(k)
  input  y_t                err_prev_i,  // error(k), full precision
  output y_t                err_full_o,  // error(k+1), full precision
  output logic [ERR_W-1:0]  err_o,       // |error|, unsigned 2.8
  output logic [RATE_W-1:0] rate_o,      // folded rate, unsigned 6.4
  output logic              mirror_o,    // error was negative
  output logic              clamp_o      // rate was clamped to zero
);

  localparam int unsigned RW = Y_W + 8;

  y_t                   e, e_abs;
  logic signed [RW-1:0] rate_full, rate_fold;

  always_comb begin
    e         = step_i - y_i;
    rate_full = (RW'(err_prev_i) - RW'(e)) * RW'(INV_T);
    mirror_o  = e < 0;
    e_abs     = mirror_o ? -e : e;
    rate_fold = mirror_o ? -rate_full : rate_full;

    if ((e_abs >>> (Y_FRAC - ERR_FRAC)) > y_t'(2**ERR_W - 1))
      err_o = '1;
    else
      err_o = e_abs[Y_FRAC - ERR_FRAC +: ERR_W];

    clamp_o = rate_fold < 0;
    if (clamp_o)
      rate_o = '0;
    else if ((rate_fold >>> (Y_FRAC - RATE_FRAC)) > RW'(2**RATE_W - 1))
      rate_o = '1;
    else
      rate_o = rate_fold[Y_FRAC - RATE_FRAC +: RATE_W];
  end

  assign err_full_o = e;

endmodule
