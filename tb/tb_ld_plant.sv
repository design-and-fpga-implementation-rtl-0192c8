// tb_ld_plant -- drives the default plant (servomotor model) with a random
// bounded input sequence and compares every output with the difference
// equation y(k) = 0.0033 x(k) + 1.667 y(k-1) - 0.667 y(k-2) evaluated here in
// real arithmetic, with the coefficients rounded to 16 fraction bits (b2
// kept at b1 + 1 so the plant's integrator is exact); the tolerance covers
// the truncated products. A second instance with made-up a1, a2 checks the
// other taps, and an idle enable must hold the state. A third instance
// with the same taps and INTERLEAVE = 4 must behave as four independent
// filters taking enabled samples in turn.
module tb_ld_plant;
  import ld_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  ctl_out_t x;
  y_t y, yp, yn, y2, yp2, yn2, y3, yp3, yn3;

  ld_plant dut (.clk_i(clk), .rst_ni(rst_n), .en_i(en), .x_i(x),
                .y_o(y), .y_prev_o(yp), .y_next_o(yn));
  // a0 = 0.5, a1 = 0.25, a2 = -0.125, b1 = -0.5, b2 = 0.25
  ld_plant #(.A0(20'sd32768), .A1(20'sd16384), .A2(-20'sd8192),
             .B1(-20'sd32768), .B2(20'sd16384))
    dut2 (.clk_i(clk), .rst_ni(rst_n), .en_i(en), .x_i(x),
          .y_o(y2), .y_prev_o(yp2), .y_next_o(yn2));
  ld_plant #(.A0(20'sd32768), .A1(20'sd16384), .A2(-20'sd8192),
             .B1(-20'sd32768), .B2(20'sd16384), .INTERLEAVE(4))
    dut3 (.clk_i(clk), .rst_ni(rst_n), .en_i(en), .x_i(x),
          .y_o(y3), .y_prev_o(yp3), .y_next_o(yn3));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real to_r(y_t v); return real'(v) / 65536.0; endfunction

  initial begin
    // coefficients as stored with 16 fraction bits
    automatic real ca0 = $floor(0.0033 * 65536.0 + 0.5) / 65536.0;
    automatic real cb1 = $floor(1.667 * 65536.0 + 0.5) / 65536.0;
    automatic real cb2 = cb1 - 1.0;
    automatic real r1 = 0, r2 = 0, rn, s1 = 0, s2 = 0, sn, xr, x1 = 0, x2 = 0;
    // four independent streams for the interleaved instance
    real q1 [4], q2 [4], qx1 [4], qx2 [4], qn, qp;
    automatic int st = 0;
    for (int m = 0; m < 4; m++) begin q1[m] = 0; q2[m] = 0; qx1[m] = 0; qx2[m] = 0; end
    qp = 0;
    x = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 120; k++) begin
      @(negedge clk);
      en = (k % 9 != 4);
      x  = ctl_out_t'($signed($urandom_range(0, 400000)) - 200000);
      if (k > 60) x = (k % 2 == 1) ? 20'sd4096 : -20'sd4096;
      xr = real'(x) / 4096.0;
      @(posedge clk); #1;
      if (en) begin
        rn = ca0 * xr + cb1 * r1 - cb2 * r2;
        r2 = r1; r1 = rn;
        sn = 0.5 * xr + 0.25 * x1 - 0.125 * x2 + 0.5 * s1 - 0.25 * s2;
        s2 = s1; s1 = sn; x2 = x1; x1 = xr;
        qn = 0.5 * xr + 0.25 * qx1[st] - 0.125 * qx2[st] + 0.5 * q1[st] - 0.25 * q2[st];
        qp = q1[st];
        q2[st] = q1[st]; q1[st] = qn; qx2[st] = qx1[st]; qx1[st] = xr;
        st = (st + 1) % 4;
      end
      checks++;
      if (to_r(y3) - q1[(st + 3) % 4] > 0.001 || q1[(st + 3) % 4] - to_r(y3) > 0.001 ||
          to_r(yp3) - qp > 0.001 || qp - to_r(yp3) > 0.001) begin
        failures++;
        $display("FAIL k=%0d interleaved y=%f/%f yprev=%f/%f", k, to_r(y3),
                 q1[(st + 3) % 4], to_r(yp3), qp);
      end
      checks++;
      if (to_r(y) - r1 > 0.002 + 0.002 * (r1 < 0 ? -r1 : r1) ||
          r1 - to_r(y) > 0.002 + 0.002 * (r1 < 0 ? -r1 : r1) ||
          to_r(yp) - r2 > 0.002 + 0.002 * (r2 < 0 ? -r2 : r2) ||
          r2 - to_r(yp) > 0.002 + 0.002 * (r2 < 0 ? -r2 : r2)) begin
        failures++;
        $display("FAIL k=%0d servo y=%f/%f yprev=%f/%f", k, to_r(y), r1, to_r(yp), r2);
      end
      checks++;
      if (to_r(y2) - s1 > 0.001 || s1 - to_r(y2) > 0.001) begin
        failures++;
        $display("FAIL k=%0d taps y=%f expected %f", k, to_r(y2), s1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
