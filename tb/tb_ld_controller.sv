// tb_ld_controller -- random error/rate/mirror inputs into three controller
// instances: single-cycle plain, single-cycle with correction factor, and
// pipelined plain.
//  * The plain output is compared with the log-domain algorithm evaluated
//    here in real arithmetic: memberships from the triangle formulas,
//    firing strength = min, consequents from the rule table, and
//    u = +-exp(max_i ln(fs_i |c_i|) - ln(max_i fs_i)), the sign taken from
//    the winning consequent (flipped by mirror). Tolerance: 0.6 % plus three
//    output steps; near ties between opposite signs accept either sign.
//  * The corrected output is compared with
//    exp(D1 + exp(D2-D1) - exp(A1-A2) + A1) within 1.5 % plus four steps.
//  * The pipelined output must equal the single-cycle output of three
//    enabled cycles earlier, with valid_o delayed by exactly three enabled
//    cycles. Its enable is dropped every 11th cycle: during such a stall
//    the pipeline must hold and the input presented is not taken.
module tb_ld_controller;
  import ld_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, valid = 0, mirror = 0, pen = 1;
  logic [9:0] err = '0, rate = '0;
  logic v_s, v_c, v_p;
  ctl_out_t u_s, u_c, u_p;

  ld_controller #(.PIPELINED(1'b0)) u_single (
    .clk_i(clk), .rst_ni(rst_n), .en_i(1'b1), .valid_i(valid), .err_i(err), .rate_i(rate),
    .mirror_i(mirror), .valid_o(v_s), .u_o(u_s));
  ld_controller #(.PIPELINED(1'b0), .USE_CORRECTION(1'b1)) u_corr (
    .clk_i(clk), .rst_ni(rst_n), .en_i(1'b1), .valid_i(valid), .err_i(err), .rate_i(rate),
    .mirror_i(mirror), .valid_o(v_c), .u_o(u_c));
  ld_controller #(.PIPELINED(1'b1)) u_pipe (
    .clk_i(clk), .rst_ni(rst_n), .en_i(pen), .valid_i(valid), .err_i(err), .rate_i(rate),
    .mirror_i(mirror), .valid_o(v_p), .u_o(u_p));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cons [5][5] = '{
    '{-150, -150, -100,  -50,    0},
    '{-150, -100,  -50,    0,   50},
    '{-100,  -50,    0,   50,  100},
    '{ -50,    0,   50,  100,  150},
    '{   0,   50,  100,  150,  150}
  };

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

  function automatic real absr(real v); return (v < 0.0) ? -v : v; endfunction

  // reference; returns plain and corrected values and whether the sign is
  // ambiguous
  task automatic reference(input int e, input int r, input logic m,
                           output real plain, output real corr, output logic amb,
                           output logic tiny);
    real me [5], mr [5];
    real d1, d2, f1, f2, d_opp, fs, d;
    logic neg1;
    d1 = -1e9; d2 = -1e9; f1 = 0.0; f2 = 0.0; d_opp = -1e9; neg1 = 0;
    for (int k = 0; k < 5; k++) begin
      me[k] = mu(e / 256.0, k, 1.0);
      mr[k] = mu(-r / 16.0, k, 50.0);
    end
    for (int j = 0; j < 5; j++)
      for (int i = 0; i < 5; i++) begin
        fs = (me[i] < mr[j]) ? me[i] : mr[j];
        if (fs > 0.0) begin
          if (fs > f1) begin f2 = f1; f1 = fs; end
          else if (fs > f2) f2 = fs;
          if (cons[j][i] != 0) begin
            d = $ln(fs * absr(real'(cons[j][i])));
            if (d > d1) begin
              if ((cons[j][i] < 0) != neg1 && d1 > d_opp) d_opp = d1;
              d2 = d1; d1 = d; neg1 = cons[j][i] < 0;
            end else begin
              if (d > d2) d2 = d;
              if ((cons[j][i] < 0) != neg1 && d > d_opp) d_opp = d;
            end
          end
        end
      end
    tiny  = d1 < -1e8;
    amb   = (d1 - d_opp) < 0.003;
    plain = tiny ? 0.0 : $exp(d1 - $ln(f1));
    corr  = tiny ? 0.0 : $exp(d1 + ((d2 < -1e8) ? 0.0 : $exp(d2 - d1))
                             - ((f2 > 0.0) ? (f2 / f1) : 0.0) - $ln(f1));
    if (neg1 ^ m) begin plain = -plain; corr = -corr; end
  endtask

  ctl_out_t hist_u [4];
  logic     hist_v [4];

  initial begin
    automatic int n_amb = 0, n_en = 0, n_stall = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      real pl, co, got;
      logic amb, tiny;
      @(negedge clk);
      err    = 10'($urandom);
      rate   = 10'($urandom);
      if (t % 3 == 0) err  = 10'($urandom_range(0, 520));
      if (t % 3 == 1) rate = 10'($urandom_range(0, 640));
      if (t % 50 == 7) begin err = '0; rate = '0; end
      mirror = 1'($urandom);
      valid  = (t % 13 != 5);
      pen    = (t % 11 != 7);
      #1;
      reference(int'(err), int'(rate), mirror, pl, co, amb, tiny);
      if (amb) n_amb++;
      // single-cycle plain
      got = real'(u_s) / 4096.0;
      checks++;
      if (tiny ? (absr(got) > 3.0 / 4096.0)
               : (absr(got - pl) > 0.006 * absr(pl) + 3.0 / 4096.0 &&
                  !(amb && absr(got + pl) <= 0.006 * absr(pl) + 3.0 / 4096.0))) begin
        failures++;
        $display("FAIL plain e=%0d r=%0d m=%0d got %f expected %f", err, rate, mirror, got, pl);
      end
      checks++;
      if (v_s !== valid) begin failures++; $display("FAIL valid (single)"); end
      // corrected
      got = real'(u_c) / 4096.0;
      checks++;
      if (tiny ? (absr(got) > 4.0 / 4096.0)
               : (absr(got - co) > 0.015 * absr(co) + 4.0 / 4096.0 &&
                  !(amb && absr(got + co) <= 0.015 * absr(co) + 4.0 / 4096.0))) begin
        failures++;
        $display("FAIL corrected e=%0d r=%0d m=%0d got %f expected %f", err, rate, mirror, got, co);
      end
      // pipelined: compare with the single-cycle result of 3 cycles ago
      if (n_en >= 3) begin
        checks++;
        if (u_p !== hist_u[2] || v_p !== hist_v[2]) begin
          failures++;
          $display("FAIL pipe t=%0d got %0d/%0d expected %0d/%0d", t, u_p, v_p, hist_u[2], hist_v[2]);
        end
      end
      @(posedge clk);
      if (pen) begin
        n_en++;
        hist_u[3] = hist_u[2]; hist_u[2] = hist_u[1]; hist_u[1] = hist_u[0]; hist_u[0] = u_s;
        hist_v[3] = hist_v[2]; hist_v[2] = hist_v[1]; hist_v[1] = hist_v[0]; hist_v[0] = valid;
      end else n_stall++;
    end
    $display("near-tie samples: %0d, stall cycles: %0d", n_amb, n_stall);
    checks++;
    if (n_stall == 0) begin failures++; $display("FAIL no stall"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
