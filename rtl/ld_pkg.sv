// ld_pkg -- shared number formats, rule base and plant constants of the
// log-domain fuzzy controller.
//
// The controller works on magnitudes of natural logarithms, so that the
// products and the quotient of centre-of-gravity defuzzification become
// additions and subtractions. All formats below are fixed point:
//
//   error input      10 bit unsigned, 2 integer + 8 fraction bits (0 .. 3.996)
//   rate input       10 bit unsigned, 6 integer + 4 fraction bits (0 .. 63.94)
//   -ln(membership)  16 bit unsigned, 4 integer + 12 fraction bits
//   ln|consequent|   16 bit signed, 12 fraction bits (-8.0 marks a zero consequent)
//   D, A, LO         18 bit signed, 12 fraction bits
//   EXP_LUT3 address 12 bit signed, 3 integer + 8 fraction bits (-8 .. +7.996)
//   controller out   20 bit two's complement, 7 integer + 12 fraction bits
//   plant signals    24 bit signed, 16 fraction bits
//
// The input, membership, EXP_LUT3 and output widths follow the published
// FPGA implementation; the widths of the internal log sums and of the plant
// state are this design's own choice. The rule base is the 5x5 PD-like table
// with singletons at 0, +-L, +-m1*L, +-m2*L (L = 50, m1 = 2, m2 = 3).
package ld_pkg;

  // ---------------------------------------------------------------- inputs
  localparam int unsigned ERR_W     = 10;
  localparam int unsigned ERR_FRAC  = 8;
  localparam int unsigned RATE_W    = 10;
  localparam int unsigned RATE_FRAC = 4;

  // number of membership functions per input and of rules
  localparam int unsigned NMF   = 5;
  localparam int unsigned NRULE = NMF * NMF;

  // ------------------------------------------------------------ log values
  localparam int unsigned LOG_FRAC = 12;
  localparam int unsigned LMF_W    = 16;          // -ln(mu), unsigned 4.12
  localparam int unsigned LC_W     = 16;          // ln|c|, signed .12
  localparam int unsigned LD_W     = 18;          // D, A, LO, signed .12

  typedef logic [LMF_W-1:0]        lmf_t;         // stored -ln(mu) (sign dropped)
  typedef logic signed [LC_W-1:0]  lc_t;          // ln|consequent|
  typedef logic signed [LD_W-1:0]  ld_t;          // log-domain working value

  localparam lmf_t LMF_ZERO = '1;                 // membership 0: largest code
  localparam lc_t  LC_ZERO  = lc_t'(-32768);      // zero consequent: -8.0

  // ----------------------------------------------------------- exp table
  localparam int unsigned EXP_AW   = 12;          // EXP_LUT3 address bits
  localparam int unsigned EXP_AFR  = 8;           // its fraction bits
  localparam int unsigned OUT_W    = 20;          // controller output
  localparam int unsigned OUT_FRAC = 12;

  typedef logic signed [OUT_W-1:0] ctl_out_t;

  // ----------------------------------------------------------- rule base
  // Linguistic terms of the output singletons.
  typedef enum logic [2:0] {
    T_NB = 3'd0, T_NM = 3'd1, T_NS = 3'd2, T_ZR = 3'd3,
    T_PS = 3'd4, T_PM = 3'd5, T_PB = 3'd6
  } term_t;

  // Input terms are indexed 0..4 = NB, NM, ZR, PM, PB. Rule (rate j, error i)
  // sits at index j*NMF + i. Row j = rate term, column i = error term.
  localparam term_t RULE_TABLE [NRULE] = '{
    // error:  NB    NM    ZR    PM    PB
    /* NB */ T_NB, T_NB, T_NM, T_NS, T_ZR,
    /* NM */ T_NB, T_NM, T_NS, T_ZR, T_PS,
    /* ZR */ T_NM, T_NS, T_ZR, T_PS, T_PM,
    /* PM */ T_NS, T_ZR, T_PS, T_PM, T_PB,
    /* PB */ T_ZR, T_PS, T_PM, T_PB, T_PB
  };

  // ln|c| of each output term in .12 fixed point: round(4096*ln(50*k)),
  // k = 1, 2, 3 (L = 50, m1 = 2, m2 = 3).
  localparam lc_t LN_L   = 16'sd16024;            // ln(50)
  localparam lc_t LN_M1L = 16'sd18863;            // ln(100)
  localparam lc_t LN_M2L = 16'sd20524;            // ln(150)

  function automatic lc_t term_log(term_t t);
    unique case (t)
      T_NB, T_PB: return LN_M2L;
      T_NM, T_PM: return LN_M1L;
      T_NS, T_PS: return LN_L;
      default:    return LC_ZERO;
    endcase
  endfunction

  function automatic logic term_neg(term_t t);
    return (t == T_NB) || (t == T_NM) || (t == T_NS);
  endfunction

  // ---------------------------------------------------------------- plant
  localparam int unsigned Y_W      = 24;          // plant signals, signed
  localparam int unsigned Y_FRAC   = 16;
  localparam int unsigned COEF_W   = 20;          // filter coefficients, signed
  localparam int unsigned COEF_FRAC = 16;

  typedef logic signed [Y_W-1:0]    y_t;
  typedef logic signed [COEF_W-1:0] coef_t;

  // Backward-rule discretisation of 1/(0.02 s^2 + s) at T = 0.01 s:
  // y(k) = a0 x(k) + a1 x(k-1) + a2 x(k-2) - b1 y(k-1) - b2 y(k-2)
  // a0 = 0.0033, a1 = a2 = 0, b1 = -1.667, b2 = 0.667 (in .16 fixed point).
  localparam coef_t A0_Q = 20'sd216;              // round(0.0033 * 65536)
  localparam coef_t A1_Q = 20'sd0;
  localparam coef_t A2_Q = 20'sd0;
  localparam coef_t B1_Q = -20'sd109249;          // round(-1.667 * 65536)
  localparam coef_t B2_Q = 20'sd43713;            // b2 = -b1 - 1 exactly

  // Step amplitude 2.0 and 1/T = 100.
  localparam y_t STEP_AMP = y_t'(2 <<< Y_FRAC);
  localparam int unsigned INV_T = 100;

endpackage
