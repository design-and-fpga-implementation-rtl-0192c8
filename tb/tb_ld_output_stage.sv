// tb_ld_output_stage -- random LO values over and beyond the table range
// with random signs. Expected: 0 below -8, otherwise +-exp of LO truncated
// to 8 fraction bits (clamped at 2047/256), in 12 fraction bits, saturating
// at 2^19 - 1, within one output step.
module tb_ld_output_stage;
  import ld_pkg::*;

  int checks = 0, failures = 0;
  ld_t      lo;
  logic     neg;
  ctl_out_t u;
  int       n_under = 0, n_sat = 0;

  ld_output_stage dut (.lo_i(lo), .neg_i(neg), .u_o(u));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      real x, m, e;
      int  q8;
      lo  = ld_t'($signed($urandom_range(0, 90000)) - 50000);
      neg = 1'($urandom);
      #1;
      q8 = int'(lo) >>> 4;
      if (q8 < -2048) e = 0.0;
      else begin
        if (q8 > 2047) q8 = 2047;
        x = real'(q8) / 256.0;
        m = $exp(x) * 4096.0;
        if (m > 524287.0) begin m = 524287.0; n_sat++; end
        e = neg ? -m : m;
      end
      if (q8 < -2048) n_under++;
      checks++;
      if (real'(u) - e > 1.0 || e - real'(u) > 1.0) begin
        failures++;
        $display("FAIL lo=%0d neg=%0d got %0d expected %f", lo, neg, u, e);
      end
    end
    checks++;
    if (n_under == 0 || n_sat == 0) begin
      failures++;
      $display("FAIL coverage: underflow %0d saturation %0d", n_under, n_sat);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
