// ld_defuzz_select -- first half of the log-domain defuzzifier (SUB1, COMP1,
// COMP2).
//
// Centre-of-gravity defuzzification needs sum(fs_i * c_i) / sum(fs_i). In
// the log domain each product becomes D_i = ln|c_i| + ln(fs_i) = S_i - A_i
// (SUB1, with A_i = -ln(fs_i) kept positive), and each sum is approximated
// by its largest term. COMP1 therefore picks the two largest D values, D1
// and D2, and COMP2 the two smallest A values, A1 and A2 (the two strongest
// rules). The sign of the output is the sign of the consequent of the rule
// that gave D1. The second values are used only by the correction factor.
//
// Purely combinational; the values are 18 bit signed with 12 fraction bits.
module ld_defuzz_select
  import ld_pkg::*;
(
  input  lmf_t a_i   [NRULE],     // -ln(firing strength)
  input  lc_t  s_i   [NRULE],     // ln|consequent|
  input  logic neg_i [NRULE],     // consequent sign
  output ld_t  d1_o,              // largest  S_i - A_i
  output ld_t  d2_o,              // second largest
  output ld_t  a1_o,              // smallest A_i
  output ld_t  a2_o,              // second smallest
  output logic neg_o              // sign of the rule that gave d1
);

  ld_t d   [NRULE];
  ld_t ax  [NRULE];
  logic [$clog2(NRULE)-1:0] d_idx, a_idx;

  always_comb begin
    for (int k = 0; k < NRULE; k++) begin
      ax[k] = ld_t'({1'b0, a_i[k]});
      d[k]  = ld_t'(s_i[k]) - ax[k];           // SUB1
    end
  end

  ld_top2 #(.N(NRULE), .W(LD_W), .FIND_MIN(1'b0)) u_comp1 (
    .v_i(d), .first_o(d1_o), .second_o(d2_o), .idx_o(d_idx)
  );

  ld_top2 #(.N(NRULE), .W(LD_W), .FIND_MIN(1'b1)) u_comp2 (
    .v_i(ax), .first_o(a1_o), .second_o(a2_o), .idx_o(a_idx)
  );

  assign neg_o = neg_i[d_idx];

endmodule
