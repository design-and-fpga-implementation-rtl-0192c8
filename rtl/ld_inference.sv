// ld_inference -- log-domain inference engine and rule base.
//
// A rule fires with strength min(mu_err, mu_rate). The fuzzifier delivers
// -ln(mu), so the minimum of the memberships becomes the maximum of the
// stored magnitudes: A = max(le[i], lr[j]) for every one of the 25 pairs of
// an error term i and a rate term j. Alongside, the rule base supplies for
// each rule the logarithm of its consequent's magnitude, S = ln|c|, and a
// separate sign bit; a zero consequent carries the code -8.0, small enough
// that it never wins the later maximum against a live non-zero consequent.
//
// Purely combinational. Rule (rate j, error i) is at index j*5 + i; terms
// are ordered NB, NM, ZR, PM, PB. All 25 rules are evaluated; for the step
// responses of the published system only the six rules built from error
// terms {ZR, PM, PB} and rate terms {NM, ZR} can be non-zero, and the other
// rules then hold the "zero" code and change nothing downstream.
module ld_inference
  import ld_pkg::*;
(
  input  lmf_t le_i   [NMF],      // -ln(mu) of the error terms
  input  lmf_t lr_i   [NMF],      // -ln(mu) of the rate terms
  output lmf_t a_o    [NRULE],    // A: -ln(firing strength) per rule
  output lc_t  s_o    [NRULE],    // S: ln|consequent| per rule
  output logic neg_o  [NRULE]     // consequent is negative
);

  always_comb begin
    for (int j = 0; j < NMF; j++) begin
      for (int i = 0; i < NMF; i++) begin
        a_o[j*NMF + i]   = (le_i[i] > lr_i[j]) ? le_i[i] : lr_i[j];
        s_o[j*NMF + i]   = term_log(RULE_TABLE[j*NMF + i]);
        neg_o[j*NMF + i] = term_neg(RULE_TABLE[j*NMF + i]);
      end
    end
  end

endmodule
