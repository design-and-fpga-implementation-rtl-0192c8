// tb_ld_defuzz_select -- random firing strengths A (including "zero" codes),
// random ln|c| values S and signs. Expected: D_i = S_i - A_i; D1/D2 the two
// largest D; A1/A2 the two smallest A; the sign of the first rule (lowest
// index) reaching D1. Found here by plain scans.
module tb_ld_defuzz_select;
  import ld_pkg::*;

  int checks = 0, failures = 0;
  lmf_t a [NRULE];
  lc_t  s [NRULE];
  logic n [NRULE];
  ld_t  d1, d2, a1, a2;
  logic neg;

  ld_defuzz_select dut (.a_i(a), .s_i(s), .neg_i(n),
                        .d1_o(d1), .d2_o(d2), .a1_o(a1), .a2_o(a2), .neg_o(neg));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      int d [NRULE];
      int ed1, ed2, ea1, ea2, idx, c1, c2;
      for (int k = 0; k < NRULE; k++) begin
        a[k] = ($urandom_range(0, 3) == 0) ? 16'hFFFF : 16'($urandom_range(0, 40000));
        s[k] = ($urandom_range(0, 4) == 0) ? -16'sd32768 : 16'($urandom_range(0, 21000));
        n[k] = 1'($urandom);
        if (t % 10 == 0 && k > 0) begin a[k] = a[0]; s[k] = s[0]; end
      end
      #1;
      ed1 = -(1 << 30); ea1 = (1 << 30); idx = 0;
      for (int k = 0; k < NRULE; k++) begin
        d[k] = int'(s[k]) - int'(a[k]);
        if (d[k] > ed1) begin ed1 = d[k]; idx = k; end
        if (int'(a[k]) < ea1) ea1 = int'(a[k]);
      end
      ed2 = -(1 << 30); ea2 = (1 << 30); c1 = 0; c2 = 0;
      for (int k = 0; k < NRULE; k++) begin
        if (d[k] == ed1) c1++; else if (d[k] > ed2) ed2 = d[k];
        if (int'(a[k]) == ea1) c2++; else if (int'(a[k]) < ea2) ea2 = int'(a[k]);
      end
      if (c1 > 1) ed2 = ed1;
      if (c2 > 1) ea2 = ea1;
      checks++;
      if (int'(d1) != ed1 || int'(d2) != ed2 || int'(a1) != ea1 || int'(a2) != ea2 || neg !== n[idx]) begin
        failures++;
        $display("FAIL t=%0d got D %0d %0d A %0d %0d neg %0d; expected %0d %0d %0d %0d %0d",
                 t, d1, d2, a1, a2, neg, ed1, ed2, ea1, ea2, n[idx]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
