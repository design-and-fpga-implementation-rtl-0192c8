// tb_ld_fuzzifier -- checks every row of both fuzzifier tables against
// -ln(mu) computed here from the piecewise-linear membership functions
// NB, NM, ZR, PM, PB (error W = 1.0 in 2.8 format, rate W = 50.0 at -|r| in
// 6.4 format). A code may differ by one step from the rounded value; a zero
// membership must give the all-ones code.
module tb_ld_fuzzifier;
  import ld_pkg::*;

  int checks = 0, failures = 0;
  logic [ERR_W-1:0]  err;
  logic [RATE_W-1:0] rate;
  lmf_t le [NMF];
  lmf_t lr [NMF];

  ld_fuzzifier dut (.err_i(err), .rate_i(rate), .le_o(le), .lr_o(lr));

  // membership of x (real units) in term k, centres -2w..2w
  function automatic real mu(real x, int k, real w);
    real lo, hi, c;
    c  = (k - 2) * w;
    lo = c - w;
    hi = c + w;
    if (k == 0) return (x <= c) ? 1.0 : (x >= hi) ? 0.0 : (hi - x) / w;
    if (k == 4) return (x >= c) ? 1.0 : (x <= lo) ? 0.0 : (x - lo) / w;
    if (x <= lo || x >= hi) return 0.0;
    return (x < c) ? (x - lo) / w : (hi - x) / w;
  endfunction

  task automatic check_code(lmf_t got, real m, string what, int a, int k);
    real exp_v;
    checks++;
    if (m <= 0.0) begin
      if (got !== 16'hFFFF) begin
        failures++;
        $display("FAIL %s addr=%0d term=%0d got=%h expected FFFF", what, a, k, got);
      end
    end else begin
      exp_v = -$ln(m) * 4096.0;
      if (exp_v > 65535.0) exp_v = 65535.0;
      if ((real'(got) - exp_v) > 1.0 || (exp_v - real'(got)) > 1.0) begin
        failures++;
        $display("FAIL %s addr=%0d term=%0d got=%0d expected %f", what, a, k, got, exp_v);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 1024; a++) begin
      err  = a[9:0];
      rate = a[9:0];
      #1;
      for (int k = 0; k < NMF; k++) begin
        check_code(le[k], mu(a / 256.0, k, 1.0), "error", a, k);
        check_code(lr[k], mu(-a / 16.0, k, 50.0), "rate", a, k);
      end
    end
    // spot values: error 1.0 is exactly PM, rate 25 gives ZR = NM = 0.5
    err = 10'd256; rate = 10'd400; #1;
    checks++; if (le[3] !== 16'd0) begin failures++; $display("FAIL PM(1.0)"); end
    checks++; if (lr[2] !== 16'd2839 || lr[1] !== 16'd2839) begin
      failures++; $display("FAIL ln2 codes %0d %0d", lr[2], lr[1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
