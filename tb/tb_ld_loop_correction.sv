// tb_ld_loop_correction -- step response of the single-cycle loop with and
// without the approximate correction factor (USE_CORRECTION = 1 / 0), over
// one rising half of the reference (HALF_PERIOD = 64 samples).
//  * Each loop's plant output is compared every sample with a
//    real-arithmetic loop built on the matching reference controller of
//    tb_ld_ref_pkg (plain, or with the correction formula), within 0.03.
//  * For both, rise time (10 % to 90 % of the step, in samples), settling
//    time (from the start until the output stays within 2.5 %) and
//    overshoot are measured and printed. Each loop must rise within 4..9
//    samples, settle within 8..14 samples and overshoot by less than 1 %.
//    The published simulation (continuous plant) found the two nearly
//    equal (rise 5.7 / 5.5, settling 10.0 / 10.0 samples); in this
//    fixed-point loop the corrected controller is about two samples slower,
//    so the two are only required to differ by at most 4 samples.
module tb_ld_loop_correction;
  import ld_pkg::*;
  import tb_ld_ref_pkg::*;

  localparam int HP = 64;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  y_t y0, y1;

  ld_system #(.PIPELINED(1'b0), .USE_CORRECTION(1'b0), .HALF_PERIOD(HP)) u_plain (
    .clk_i(clk), .rst_ni(rst_n), .en_i(en), .step_o(), .y_o(y0), .u_o(),
    .err_o(), .rate_o(), .mirror_o(), .clamp_o(), .toggle_o(), .sample_o());
  ld_system #(.PIPELINED(1'b0), .USE_CORRECTION(1'b1), .HALF_PERIOD(HP)) u_corr (
    .clk_i(clk), .rst_ni(rst_n), .en_i(en), .step_o(), .y_o(y1), .u_o(),
    .err_o(), .rate_o(), .mirror_o(), .clamp_o(), .toggle_o(), .sample_o());

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real yr(y_t v); return real'(v) / 65536.0; endfunction
  function automatic real absr(real v); return (v < 0.0) ? -v : v; endfunction

  initial begin
    automatic real ry [2], ryp [2], rep [2], ryn, re, ru, yv;
    automatic int  t10 [2], t90 [2], settle [2];
    automatic real peak [2];
    for (int c = 0; c < 2; c++) begin
      ry[c] = 0; ryp[c] = 0; rep[c] = 0; t10[c] = -1; t90[c] = -1; settle[c] = -1; peak[c] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    en = 1;
    for (int n = 0; n < HP; n++) begin
      for (int c = 0; c < 2; c++) begin
        re  = 2.0 - ry[c];
        ru  = ref_loop_control(re, (rep[c] - re) * 100.0, c == 1);
        rep[c] = re;
        ryn = 0.0033 * ru + 1.667 * ry[c] - 0.667 * ryp[c];
        ryp[c] = ry[c]; ry[c] = ryn;
      end
      @(posedge clk); #1;
      for (int c = 0; c < 2; c++) begin
        yv = yr((c == 0) ? y0 : y1);
        checks++;
        if (absr(yv - ry[c]) > 0.03) begin
          failures++;
          $display("FAIL %s n=%0d y=%f expected %f", (c == 0) ? "plain" : "corrected", n, yv, ry[c]);
        end
        if (t10[c] < 0 && yv >= 0.2) t10[c] = n + 1;
        if (t90[c] < 0 && yv >= 1.8) t90[c] = n + 1;
        if (absr(yv - 2.0) > 0.05) settle[c] = -1; else if (settle[c] < 0) settle[c] = n + 1;
        if (yv > peak[c]) peak[c] = yv;
      end
      @(negedge clk);
    end
    for (int c = 0; c < 2; c++) begin
      $display("%s: rise %0d samples (10..90 %%), settle %0d samples, overshoot %f %%",
               (c == 0) ? "plain    " : "corrected", t90[c] - t10[c], settle[c],
               (peak[c] > 2.0) ? (peak[c] - 2.0) * 50.0 : 0.0);
      checks++;
      if (t10[c] < 0 || t90[c] < 0 || t90[c] - t10[c] < 4 || t90[c] - t10[c] > 9 ||
          settle[c] < 8 || settle[c] > 14 || peak[c] > 2.02) begin
        failures++;
        $display("FAIL step response %0d", c);
      end
    end
    checks++;
    if ((t90[0] - t10[0]) - (t90[1] - t10[1]) > 4 || (t90[1] - t10[1]) - (t90[0] - t10[0]) > 4 ||
        settle[0] - settle[1] > 4 || settle[1] - settle[0] > 4) begin
      failures++;
      $display("FAIL corrected and plain loops differ");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
