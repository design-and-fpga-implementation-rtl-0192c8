// ld_fuzzy_top -- the two hardware versions of the log-domain fuzzy control
// system, side by side.
//
// u_single is the single-cycle loop: each enabled clock is one sample, and
// the whole chain from plant output through the controller back into the
// plant settles within that clock. u_pipe is the pipelined loop: three
// register stages in the controller plus the plant register, one controller
// output per clock; the four-cycle loop delay is filled by running four
// independent copies of the loop interleaved (see ld_system). Both run the
// same controller (by default without the correction factor, as built in
// hardware; USE_CORRECTION = 1 adds it), the same servomotor model and a
// square-wave step between 0 and 2.0 changing every HALF_PERIOD enabled
// clocks. The square wave and its period are this design's choice; the
// document only shows step responses. They share clock, reset and enable
// and have their own outputs; the suffix _s marks the single-cycle loop, _p
// the pipelined one.
module ld_fuzzy_top
  import ld_pkg::*;
#(
  parameter int unsigned HALF_PERIOD    = 64,  // samples per step level
  parameter bit          USE_CORRECTION = 1'b0 // 1: approximate correction factor
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  input  logic              en_i,
  // single-cycle loop
  output y_t                step_s_o,
  output y_t                y_s_o,
  output ctl_out_t          u_s_o,
  output logic [ERR_W-1:0]  err_s_o,
  output logic [RATE_W-1:0] rate_s_o,
  output logic              mirror_s_o,
  output logic              clamp_s_o,
  output logic              toggle_s_o,
  output logic              sample_s_o,
  // pipelined loop
  output y_t                step_p_o,
  output y_t                y_p_o,
  output ctl_out_t          u_p_o,
  output logic [ERR_W-1:0]  err_p_o,
  output logic [RATE_W-1:0] rate_p_o,
  output logic              mirror_p_o,
  output logic              clamp_p_o,
  output logic              toggle_p_o,
  output logic              sample_p_o
);

  ld_system #(.PIPELINED(1'b0), .USE_CORRECTION(USE_CORRECTION), .HALF_PERIOD(HALF_PERIOD)) u_single (
    .clk_i, .rst_ni, .en_i,
    .step_o(step_s_o), .y_o(y_s_o), .u_o(u_s_o), .err_o(err_s_o),
    .rate_o(rate_s_o), .mirror_o(mirror_s_o), .clamp_o(clamp_s_o),
    .toggle_o(toggle_s_o), .sample_o(sample_s_o)
  );

  ld_system #(.PIPELINED(1'b1), .USE_CORRECTION(USE_CORRECTION), .HALF_PERIOD(HALF_PERIOD)) u_pipe (
    .clk_i, .rst_ni, .en_i,
    .step_o(step_p_o), .y_o(y_p_o), .u_o(u_p_o), .err_o(err_p_o),
    .rate_o(rate_p_o), .mirror_o(mirror_p_o), .clamp_o(clamp_p_o),
    .toggle_o(toggle_p_o), .sample_o(sample_p_o)
  );

endmodule
