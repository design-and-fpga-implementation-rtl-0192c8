// tb_ld_correction -- random D1 >= D2 and A1 <= A2 into the plain block
// (LO must equal D1 + A1 exactly) and into the corrected block, whose LO
// must match D1 + exp(D2-D1) - exp(A1-A2) + A1 computed here in real
// arithmetic, within the error of the 8-fraction-bit table address
// (about 1/256 per exponential) plus rounding.
module tb_ld_correction;
  import ld_pkg::*;

  int checks = 0, failures = 0;
  ld_t d1, d2, a1, a2, lo_plain, lo_corr;

  ld_correction #(.USE_CORRECTION(1'b0)) u_plain (
    .d1_i(d1), .d2_i(d2), .a1_i(a1), .a2_i(a2), .lo_o(lo_plain));
  ld_correction #(.USE_CORRECTION(1'b1)) u_corr (
    .d1_i(d1), .d2_i(d2), .a1_i(a1), .a2_i(a2), .lo_o(lo_corr));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      real r1, r2, q1, q2, ref_lo, got;
      d1 = ld_t'($signed($urandom_range(0, 30000)) - 20000);
      d2 = d1 - ld_t'($urandom_range(0, (t % 3 == 0) ? 80000 : 12000));
      a1 = ld_t'($urandom_range(0, 40000));
      a2 = a1 + ld_t'($urandom_range(0, (t % 4 == 0) ? 30000 : 8000));
      if (t % 17 == 0) begin d2 = d1; a2 = a1; end
      #1;
      checks++;
      if (lo_plain !== d1 + a1) begin
        failures++;
        $display("FAIL plain: %0d + %0d gave %0d", d1, a1, lo_plain);
      end
      r1 = real'(d1) / 4096.0; r2 = real'(d2) / 4096.0;
      q1 = real'(a1) / 4096.0; q2 = real'(a2) / 4096.0;
      ref_lo = r1 + $exp(r2 - r1) - $exp(q1 - q2) + q1;
      got = real'(lo_corr) / 4096.0;
      checks++;
      if (got - ref_lo > 0.01 || ref_lo - got > 0.01) begin
        failures++;
        $display("FAIL corrected: D %f %f A %f %f got %f expected %f", r1, r2, q1, q2, got, ref_lo);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
