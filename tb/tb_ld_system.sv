// tb_ld_system -- closed-loop step responses of the single-cycle and the
// pipelined loop (HALF_PERIOD = 64 enabled clocks, one full period).
//  * Single-cycle: every sample's plant output is compared with a
//    real-arithmetic loop (reference controller, plant 0.0033 / 1.667 /
//    0.667, error and rate formed the same way) within 0.03. The samples to
//    reach 1.8 and to stay above 1.95 are measured; the published figures
//    are 8 and 11 samples, and both must be within two samples of them.
//  * Pipelined (four interleaved loops): the plant must hold for the three
//    cycles before the first controller output and then update every cycle.
//    The reference keeps four independent loop states; the input formed in
//    cycle n belongs to loop n mod 4 and its plant output is visible after
//    the edge ending cycle n + 3. Every cycle is compared within 0.05.
//    Cycles to 1.8 and to settle within 2.5 % are reported (published: 27
//    and 46) and must lie within 20..36 and 30..56.
//  * Both loops must follow the falling half (mirrored error) back to 0.
module tb_ld_system;
  import ld_pkg::*;
  import tb_ld_ref_pkg::*;

  localparam int HP = 64;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  y_t step_s, y_s, step_p, y_p;
  ctl_out_t u_s, u_p;
  logic [9:0] err_s, rate_s, err_p, rate_p;
  logic mir_s, clamp_s, tog_s, smp_s, mir_p, clamp_p, tog_p, smp_p;

  ld_system #(.PIPELINED(1'b0), .HALF_PERIOD(HP)) u_single (
    .clk_i(clk), .rst_ni(rst_n), .en_i(en), .step_o(step_s), .y_o(y_s), .u_o(u_s),
    .err_o(err_s), .rate_o(rate_s), .mirror_o(mir_s), .clamp_o(clamp_s),
    .toggle_o(tog_s), .sample_o(smp_s));
  ld_system #(.PIPELINED(1'b1), .HALF_PERIOD(HP)) u_pipe (
    .clk_i(clk), .rst_ni(rst_n), .en_i(en), .step_o(step_p), .y_o(y_p), .u_o(u_p),
    .err_o(err_p), .rate_o(rate_p), .mirror_o(mir_p), .clamp_o(clamp_p),
    .toggle_o(tog_p), .sample_o(smp_p));

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
    // single-cycle reference state
    automatic real ry = 0, ryp = 0, rep = 0, re, ru, rstep, ryn;
    // pipelined reference: four loop states and the outputs in flight
    automatic real py [4], pyp [4], pep [4], pe, pu, pq [$];
    automatic int rise_s = -1, settle_s = -1, rise_p = -1, settle_p = -1;
    int n_mir_s = 0, n_mir_p = 0, fill = 0, t;
    for (int k = 0; k < 4; k++) begin py[k] = 0; pyp[k] = 0; pep[k] = 0; end

    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    en = 1;
    for (int n = 0; n < 2 * HP; n++) begin
      // reference steps mirror the RTL's step source
      rstep = ((n / HP) % 2 == 0) ? 2.0 : 0.0;
      // single-cycle reference sample n
      re  = rstep - ry;
      ru  = ref_loop_control(re, (rep - re) * 100.0);
      rep = re;
      ryn = 0.0033 * ru + 1.667 * ry - 0.667 * ryp;
      ryp = ry; ry = ryn;
      // pipelined reference: loop n mod 4 takes its sample now
      t   = n % 4;
      pe  = rstep - py[t];
      pu  = ref_loop_control(pe, (pep[t] - pe) * 100.0);
      pep[t] = pe;
      ryn = 0.0033 * pu + 1.667 * py[t] - 0.667 * pyp[t];
      pyp[t] = py[t]; py[t] = ryn;
      pq.push_back(ryn);
      if (mir_s) n_mir_s++;
      if (mir_p) n_mir_p++;
      if (!smp_p) fill++;
      @(posedge clk); #1;
      checks++;
      if (absr(yr(y_s) - ry) > 0.03) begin
        failures++;
        $display("FAIL single n=%0d y=%f expected %f", n, yr(y_s), ry);
      end
      checks++;
      ryn = (n >= 3) ? pq.pop_front() : 0.0;
      if (absr(yr(y_p) - ryn) > 0.05) begin
        failures++;
        $display("FAIL pipe n=%0d y=%f expected %f", n, yr(y_p), ryn);
      end
      if (n < HP) begin
        if (rise_s < 0 && yr(y_s) >= 1.8) rise_s = n + 1;
        if (yr(y_s) < 1.95) settle_s = -1; else if (settle_s < 0) settle_s = n + 1;
        if (rise_p < 0 && yr(y_p) >= 1.8) rise_p = n + 1;
        if (absr(yr(y_p) - 2.0) > 0.05) settle_p = -1; else if (settle_p < 0) settle_p = n + 1;
      end
      @(negedge clk);
    end
    $display("single-cycle: rise %0d samples, settle %0d samples", rise_s, settle_s);
    $display("pipelined: rise %0d cycles, settle %0d cycles, fill %0d cycles", rise_p, settle_p, fill);
    checks++;
    if (rise_s < 6 || rise_s > 10 || settle_s < 9 || settle_s > 13) begin
      failures++;
      $display("FAIL single-cycle timing");
    end
    checks++;
    if (fill != 3) begin failures++; $display("FAIL pipeline fill %0d cycles", fill); end
    checks++;
    if (rise_p < 20 || rise_p > 36 || settle_p < 30 || settle_p > 56) begin
      failures++;
      $display("FAIL pipelined timing");
    end
    checks++;
    if (n_mir_s == 0 || n_mir_p == 0 || absr(yr(y_s)) > 0.05 || absr(yr(y_p)) > 0.1) begin
      failures++;
      $display("FAIL falling half: mirror %0d/%0d, final y %f/%f", n_mir_s, n_mir_p, yr(y_s), yr(y_p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
