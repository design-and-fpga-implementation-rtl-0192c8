// tb_ld_next_input -- random step, plant output and previous error. The
// expected error is step - y; the rate (prev - error) * 100; both folded to
// the non-negative half when the error is negative, the rate clamped to 0
// when the error magnitude grows, then truncated to 2.8 and 6.4 and
// saturated at 1023. Computed here in real arithmetic with floor().
module tb_ld_next_input;
  import ld_pkg::*;

  int checks = 0, failures = 0;
  y_t step, y, ep, ef;
  logic [9:0] err, rate;
  logic mirror, clamp;
  int n_mirror = 0, n_clamp = 0, n_sat = 0;

  ld_next_input dut (.step_i(step), .y_i(y), .err_prev_i(ep), .err_full_o(ef),
                     .err_o(err), .rate_o(rate), .mirror_o(mirror), .clamp_o(clamp));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      real e, r, ea, ra;
      int  e_exp, r_exp;
      logic m_exp, c_exp;
      step = ($urandom_range(0, 1) == 1) ? y_t'(2 * 65536) : '0;
      y    = y_t'($signed($urandom_range(0, 6 * 65536)) - 2 * 65536);
      ep   = y_t'($signed(step) - $signed(y) + $signed($urandom_range(0, 65536)) - 32768);
      if (t % 11 == 0) ep = y_t'($signed($urandom_range(0, 8 * 65536)) - 4 * 65536);
      #1;
      e = (real'(step) - real'(y)) / 65536.0;
      r = (real'(ep) / 65536.0 - e) * 100.0;
      m_exp = e < 0.0;
      ea = m_exp ? -e : e;
      ra = m_exp ? -r : r;
      c_exp = ra < 0.0;
      e_exp = $rtoi($floor(ea * 256.0 + 1e-9));
      if (e_exp > 1023) e_exp = 1023;
      r_exp = c_exp ? 0 : $rtoi($floor(ra * 16.0 + 1e-9));
      if (r_exp > 1023) begin r_exp = 1023; n_sat++; end
      if (m_exp) n_mirror++;
      if (c_exp) n_clamp++;
      checks++;
      if (int'(err) != e_exp || int'(rate) != r_exp || mirror !== m_exp || clamp !== c_exp ||
          ef !== y_t'($signed(step) - $signed(y))) begin
        failures++;
        $display("FAIL e=%f r=%f got err=%0d rate=%0d m=%0d c=%0d expected %0d %0d %0d %0d",
                 e, r, err, rate, mirror, clamp, e_exp, r_exp, m_exp, c_exp);
      end
    end
    checks++;
    if (n_mirror == 0 || n_clamp == 0 || n_sat == 0) begin
      failures++;
      $display("FAIL coverage mirror=%0d clamp=%0d sat=%0d", n_mirror, n_clamp, n_sat);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
