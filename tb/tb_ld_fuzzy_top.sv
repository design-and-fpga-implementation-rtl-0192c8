// tb_ld_fuzzy_top -- end-to-end test of the full-size top (default
// parameters: HALF_PERIOD = 64, no correction factor): both loops run two
// full periods of the square-wave step, 256 enabled clocks, with one stall
// of 7 clocks in the second period.
//  * Every enabled clock, the plant outputs of both loops are compared with a
//    real-arithmetic model built here (reference controller from
//    tb_ld_ref_pkg, plant 0.0033 / 1.667 / 0.667, error and rate formed and
//    folded the same way): the single-cycle loop within 0.03, the pipelined
//    loop, modelled as four independent loops whose outputs arrive three
//    clocks later, within 0.05.
//  * During the stall every output must hold and no plant sample be taken.
//  * Mechanisms are counted and each must occur: step changes (4 per loop,
//    the last at the final clock), pipeline fill (3 clocks without a plant
//    sample), mirrored error (falling half), rate clamped to zero (the rate
//    input must then read 0), braking (negative controller output while the
//    error is positive, from the rate rules), stall clocks.
//  * First rising half: single-cycle rise/settle within 6..10 / 9..13
//    samples (published 8 / 11), pipelined within 20..36 / 30..56 clocks
//    (published 27 / 46), and neither loop may overshoot 2.0 by more than
//    2.5 %. Both loops must be back within 0.1 of 0 at the end.
module tb_ld_fuzzy_top;
  import ld_pkg::*;
  import tb_ld_ref_pkg::*;

  localparam int HP    = 64;     // the top's default
  localparam int NCYC  = 4 * HP;
  localparam int STALL_AT  = 150;
  localparam int STALL_LEN = 7;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  logic [ERR_W-1:0] err_s, err_p;   // shown for waveform viewing only
  y_t step_s, y_s, step_p, y_p;
  ctl_out_t u_s, u_p;
  logic [RATE_W-1:0] rate_s, rate_p;
  logic mir_s, clamp_s, tog_s, smp_s, mir_p, clamp_p, tog_p, smp_p;

  ld_fuzzy_top dut (
    .clk_i(clk), .rst_ni(rst_n), .en_i(en),
    .step_s_o(step_s), .y_s_o(y_s), .u_s_o(u_s), .err_s_o(err_s),
    .rate_s_o(rate_s), .mirror_s_o(mir_s), .clamp_s_o(clamp_s),
    .toggle_s_o(tog_s), .sample_s_o(smp_s),
    .step_p_o(step_p), .y_p_o(y_p), .u_p_o(u_p), .err_p_o(err_p),
    .rate_p_o(rate_p), .mirror_p_o(mir_p), .clamp_p_o(clamp_p),
    .toggle_p_o(tog_p), .sample_p_o(smp_p));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real yr(y_t v); return real'(v) / 65536.0; endfunction
  function automatic real absr(real v); return (v < 0.0) ? -v : v; endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    // single-cycle reference
    automatic real ry = 0, ryp = 0, rep = 0, re, ru, rstep, ryn;
    // pipelined reference: four loop states and the outputs in flight
    automatic real py [4], pyp [4], pep [4], pe, pu, pq [$];
    automatic int rise_s = -1, settle_s = -1, rise_p = -1, settle_p = -1;
    automatic real peak_s = 0, peak_p = 0;
    automatic int n_tog_s = 0, n_tog_p = 0, n_mir_s = 0, n_mir_p = 0;
    automatic int n_clamp_s = 0, n_clamp_p = 0, n_brake_s = 0, n_brake_p = 0;
    automatic int n_fill = 0, n_stall = 0;
    automatic int unsigned t;
    y_t hold_ys, hold_yp;
    ctl_out_t hold_us, hold_up;
    for (int k = 0; k < 4; k++) begin py[k] = 0; pyp[k] = 0; pep[k] = 0; end

    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < NCYC; n++) begin
      if (n == STALL_AT) begin
        // stall: the loops must freeze
        en = 0;
        hold_ys = y_s; hold_yp = y_p; hold_us = u_s; hold_up = u_p;
        for (int s = 0; s < STALL_LEN; s++) begin
          #1;
          check(!smp_s && !smp_p, "plant sampled during a stall");
          @(posedge clk); #1;
          n_stall++;
          check(y_s == hold_ys && y_p == hold_yp && u_s == hold_us && u_p == hold_up,
                $sformatf("outputs moved during stall clock %0d", s));
          @(negedge clk);
        end
      end
      en = 1;
      #1;
      rstep = ((n / HP) % 2 == 0) ? 2.0 : 0.0;
      check(absr(yr(step_s) - rstep) < 1e-6 && absr(yr(step_p) - rstep) < 1e-6,
            $sformatf("step level at clock %0d", n));
      // single-cycle reference sample n
      re  = rstep - ry;
      ru  = ref_loop_control(re, (rep - re) * 100.0);
      rep = re;
      ryn = 0.0033 * ru + 1.667 * ry - 0.667 * ryp;
      ryp = ry; ry = ryn;
      // pipelined reference: loop n mod 4 takes its sample now
      t   = n & 3;
      pe  = rstep - py[t];
      pu  = ref_loop_control(pe, (pep[t] - pe) * 100.0);
      pep[t] = pe;
      ryn = 0.0033 * pu + 1.667 * py[t] - 0.667 * pyp[t];
      pyp[t] = py[t]; py[t] = ryn;
      pq.push_back(ryn);
      // mechanism counters, sampled before the edge
      if (tog_s) n_tog_s++;
      if (tog_p) n_tog_p++;
      if (mir_s) n_mir_s++;
      if (mir_p) n_mir_p++;
      if (clamp_s) n_clamp_s++;
      if (clamp_p) n_clamp_p++;
      if (u_s < 0 && !mir_s) n_brake_s++;
      if (u_p < 0 && !mir_p && smp_p) n_brake_p++;
      check(!(clamp_s && rate_s != '0) && !(clamp_p && rate_p != '0), "clamped rate not zero");
      if (!smp_p) n_fill++;
      check(smp_s, $sformatf("single-cycle loop not sampling at clock %0d", n));
      @(posedge clk); #1;
      check(absr(yr(y_s) - ry) <= 0.03,
            $sformatf("single n=%0d y=%f expected %f", n, yr(y_s), ry));
      ryn = (n >= 3) ? pq.pop_front() : 0.0;
      check(absr(yr(y_p) - ryn) <= 0.05,
            $sformatf("pipe n=%0d y=%f expected %f", n, yr(y_p), ryn));
      if (n < HP) begin
        if (rise_s < 0 && yr(y_s) >= 1.8) rise_s = n + 1;
        if (yr(y_s) < 1.95) settle_s = -1; else if (settle_s < 0) settle_s = n + 1;
        if (rise_p < 0 && yr(y_p) >= 1.8) rise_p = n + 1;
        if (absr(yr(y_p) - 2.0) > 0.05) settle_p = -1; else if (settle_p < 0) settle_p = n + 1;
        if (yr(y_s) > peak_s) peak_s = yr(y_s);
        if (yr(y_p) > peak_p) peak_p = yr(y_p);
      end
      @(negedge clk);
    end
    en = 0;

    $display("single-cycle: rise %0d samples, settle %0d samples, peak %f", rise_s, settle_s, peak_s);
    $display("pipelined:    rise %0d clocks, settle %0d clocks, peak %f", rise_p, settle_p, peak_p);
    $display("step changes %0d/%0d, mirrored clocks %0d/%0d, rate clamps %0d/%0d",
             n_tog_s, n_tog_p, n_mir_s, n_mir_p, n_clamp_s, n_clamp_p);
    $display("braking outputs %0d/%0d, pipeline fill %0d, stall clocks %0d",
             n_brake_s, n_brake_p, n_fill, n_stall);
    check(rise_s >= 6 && rise_s <= 10 && settle_s >= 9 && settle_s <= 13, "single-cycle timing");
    check(rise_p >= 20 && rise_p <= 36 && settle_p >= 30 && settle_p <= 56, "pipelined timing");
    check(peak_s <= 2.05 && peak_p <= 2.05, "overshoot");
    check(n_tog_s == 4 && n_tog_p == 4, "step change count");
    check(n_fill == 3, "pipeline fill length");
    check(n_mir_s > 0 && n_mir_p > 0, "mirrored error never used");
    check(n_clamp_s > 0 && n_clamp_p > 0, "rate clamp never used");
    check(n_brake_s > 0 && n_brake_p > 0, "braking output never produced");
    check(n_stall == STALL_LEN, "stall");
    check(absr(yr(y_s)) < 0.1 && absr(yr(y_p)) < 0.1, "loops not back at 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
