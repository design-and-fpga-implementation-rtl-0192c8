// ld_system -- one closed control loop: step source, Next Input Calculator,
// log-domain fuzzy controller and plant model.
//
// PIPELINED = 0 (single-cycle loop): each clock with en_i high is one sample
// period. From the stored plant output y(k) and previous error the
// calculator forms error and rate, the controller turns them into x(k+1)
// combinationally, and the plant stores y(k+1) at the clock edge. One
// defuzzified output per clock.
//
// PIPELINED = 1: the controller has three register stages and the plant
// register is the fourth, so a plant output appears four cycles after the
// error/rate pair that caused it, and the calculator forms a new pair every
// cycle from the newest plant output. To keep the loop the same control
// loop, it runs as four interleaved independent loops (C-slow): the plant
// keeps one state per loop (INTERLEAVE = 4) and the calculator pairs each
// new error with the error of the same loop four cycles earlier. One
// controller output and one plant output per clock. In the first four
// cycles, before the first plant output, the inputs are those computed from
// the zero initial output (error = step, rate = 0); the plant holds until
// the first valid controller output arrives. Started together, the four
// loops follow the same trajectory, so each plant value appears four
// times in a row.
//
// en_i low stalls the whole loop: step source, error history, controller
// pipeline and plant all hold, so the loop resumes unchanged. All registers
// reset to zero (the step source to its high level).
module ld_system
  import ld_pkg::*;
#(
  parameter bit          PIPELINED      = 1'b0,
  parameter bit          USE_CORRECTION = 1'b0,
  parameter int unsigned HALF_PERIOD    = 64
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  input  logic              en_i,
  output y_t                step_o,     // reference
  output y_t                y_o,        // plant output
  output ctl_out_t          u_o,        // controller output entering the plant
  output logic [ERR_W-1:0]  err_o,      // controller error input
  output logic [RATE_W-1:0] rate_o,     // controller rate input
  output logic              mirror_o,   // controller working on the folded half
  output logic              clamp_o,    // rate clamped to zero this sample
  output logic              toggle_o,   // step level changes at this edge
  output logic              sample_o    // plant takes a sample at this edge
);

  localparam int unsigned C = PIPELINED ? 4 : 1;   // interleaved loops

  y_t                step, y, e_full, e_prev;
  logic [ERR_W-1:0]  err_c;
  logic [RATE_W-1:0] rate_c;
  logic              mirror_c, clamp_c;
  y_t                e_hist [C];   // errors of the last C samples

  ld_step_gen #(.HALF_PERIOD(HALF_PERIOD)) u_step (
    .clk_i, .rst_ni, .en_i, .step_o(step), .high_o(), .toggle_o
  );

  ld_next_input u_next (
    .step_i(step), .y_i(y), .err_prev_i(e_prev), .err_full_o(e_full),
    .err_o(err_c), .rate_o(rate_c), .mirror_o(mirror_c), .clamp_o(clamp_c)
  );

  // previous error of the same loop
  assign e_prev = e_hist[C-1];

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int m = 0; m < C; m++) e_hist[m] <= '0;
    end else if (en_i) begin
      e_hist[0] <= e_full;
      for (int m = 1; m < C; m++) e_hist[m] <= e_hist[m-1];
    end
  end

  logic c_valid_out;

  ld_controller #(.PIPELINED(PIPELINED), .USE_CORRECTION(USE_CORRECTION)) u_ctrl (
    .clk_i, .rst_ni, .en_i, .valid_i(en_i), .err_i(err_c), .rate_i(rate_c),
    .mirror_i(mirror_c), .valid_o(c_valid_out), .u_o
  );

  ld_plant #(.INTERLEAVE(C)) u_plant (
    .clk_i, .rst_ni, .en_i(c_valid_out & en_i), .x_i(u_o),
    .y_o(y), .y_prev_o(), .y_next_o()
  );

  assign step_o   = step;
  assign y_o      = y;
  assign err_o    = err_c;
  assign rate_o   = rate_c;
  assign mirror_o = mirror_c;
  assign clamp_o  = clamp_c;
  assign sample_o = c_valid_out & en_i;

endmodule
