// tb_ld_inference -- random -ln(mu) vectors into the inference engine. Each
// rule's A must be the larger of its two input codes; S and the sign must
// match the 5x5 rule table written out below as consequent values
// (L = 50, m1 = 2, m2 = 3), with ln|c| rounded to 12 fraction bits and a
// zero consequent coded as -32768.
module tb_ld_inference;
  import ld_pkg::*;

  int checks = 0, failures = 0;
  lmf_t le [NMF];
  lmf_t lr [NMF];
  lmf_t a  [NRULE];
  lc_t  s  [NRULE];
  logic n  [NRULE];

  ld_inference dut (.le_i(le), .lr_i(lr), .a_o(a), .s_o(s), .neg_o(n));

  // consequent per (rate row j, error column i), rows NB, NM, ZR, PM, PB
  int cons [5][5] = '{
    '{-150, -150, -100,  -50,    0},
    '{-150, -100,  -50,    0,   50},
    '{-100,  -50,    0,   50,  100},
    '{ -50,    0,   50,  100,  150},
    '{   0,   50,  100,  150,  150}
  };

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int k = 0; k < NMF; k++) begin
        le[k] = (t % 7 == 0) ? 16'hFFFF : 16'($urandom);
        lr[k] = (t % 5 == 0) ? 16'd0    : 16'($urandom);
      end
      #1;
      for (int j = 0; j < 5; j++)
        for (int i = 0; i < 5; i++) begin
          int   c;
          lmf_t ea;
          int   es;
          c  = cons[j][i];
          ea = (le[i] >= lr[j]) ? le[i] : lr[j];
          es = (c == 0) ? -32768 : $rtoi($ln(real'((c < 0) ? -c : c)) * 4096.0 + 0.5);
          checks++;
          if (a[j*5+i] !== ea || int'(s[j*5+i]) != es || n[j*5+i] !== (c < 0)) begin
            failures++;
            $display("FAIL rule (%0d,%0d): A=%0d/%0d S=%0d/%0d neg=%0d", j, i,
                     a[j*5+i], ea, s[j*5+i], es, n[j*5+i]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
