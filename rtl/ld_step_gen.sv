// ld_step_gen -- square-wave step reference for the control loop.
//
// The reference alternates between AMP (positive half) and 0 (negative
// half), HALF_PERIOD samples each, so that repeated step responses of the
// closed loop, rising and then falling back, can be watched on a scope. A
// sample counter advances on each clock with en_i high; when it wraps the
// level toggles and toggle_o pulses for that cycle. After reset the
// reference is AMP (the positive half starts with the first sample) and the
// counter is zero. The amplitude 2.0 follows the published system; the
// half-period length is this design's choice.
module ld_step_gen
  import ld_pkg::*;
#(
  parameter int unsigned HALF_PERIOD = 64,
  parameter y_t          AMP         = STEP_AMP
) (
  input  logic clk_i,
  input  logic rst_ni,
  input  logic en_i,
  output y_t   step_o,
  output logic high_o,
  output logic toggle_o         // level changes at this edge
);

  localparam int unsigned CW = (HALF_PERIOD > 1) ? $clog2(HALF_PERIOD) : 1;

  logic [CW-1:0] cnt;
  logic          high;

  assign toggle_o = en_i && (cnt == CW'(HALF_PERIOD - 1));

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      cnt  <= '0;
      high <= 1'b1;
    end else if (en_i) begin
      if (toggle_o) begin
        cnt  <= '0;
        high <= ~high;
      end else begin
        cnt  <= cnt + 1'b1;
      end
    end
  end

  assign high_o = high;
  assign step_o = high ? AMP : '0;

endmodule
