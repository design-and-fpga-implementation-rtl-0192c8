// tb_ld_exp_rom -- every row of the default table (EXP_LUT3: signed 3.8
// address, exp(a) with 12 fraction bits, saturating at 19 bits) and of the
// correction-factor variant (unsigned 4.8 address, exp(-a), 13 bits) against
// $exp computed here, within one output step.
module tb_ld_exp_rom;
  int checks = 0, failures = 0;
  logic [11:0] addr;
  logic [18:0] d3;
  logic [12:0] dn;

  ld_exp_rom dut3 (.addr_i(addr), .data_o(d3));
  ld_exp_rom #(.AW(12), .AFRAC(8), .ADDR_SIGNED(1'b0), .NEGATE(1'b1), .DW(13), .DFRAC(12))
    dutn (.addr_i(addr), .data_o(dn));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 4096; a++) begin
      real x, e3, en;
      addr = a[11:0];
      #1;
      x  = (a >= 2048) ? real'(a - 4096) / 256.0 : real'(a) / 256.0;
      e3 = $exp(x) * 4096.0;
      if (e3 > 524287.0) e3 = 524287.0;
      en = $exp(-real'(a) / 256.0) * 4096.0;
      checks++;
      if (real'(d3) - e3 > 1.0 || e3 - real'(d3) > 1.0) begin
        failures++;
        $display("FAIL lut3 a=%0d got %0d expected %f", a, d3, e3);
      end
      checks++;
      if (real'(dn) - en > 1.0 || en - real'(dn) > 1.0) begin
        failures++;
        $display("FAIL neg a=%0d got %0d expected %f", a, dn, en);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
