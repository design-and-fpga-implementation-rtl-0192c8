// ld_controller -- log-domain fuzzy controller (fuzzifier, inference engine
// with rule base, defuzzifier).
//
// Takes the error (unsigned 2.8) and the magnitude of the falling rate of
// error (unsigned 6.4) and returns the crisp control value (20 bit signed,
// 12 fraction bits). The chain is:
//   fuzzifier tables -> 25 log-domain firing strengths A_i and ln|c_i| ->
//   SUB1/COMP1/COMP2 (D1, D2, A1, A2, sign) -> CORRECTION (LO) ->
//   EXP_LUT3 and sign -> u
//
// The tables cover only a non-negative error with a non-positive rate, as in
// the published step-response system. mirror_i handles the mirrored case:
// the rule base is odd-symmetric, so the controller computes u(|e|, |r|)
// and negates the result (this input is this design's own addition).
//
// PIPELINED = 0: fully combinational, u_o and valid_o follow the inputs in
// the same cycle (the single-cycle controller). PIPELINED = 1: registers
// after the inference engine (stage 1), after the comparators (stage 2) and
// after EXP_LUT3/sign (stage 3), so u_o appears three cycles after its
// inputs and a new input pair is accepted every cycle; the plant register
// that follows forms stage 4. valid_i travels with the data. en_i low holds
// every pipeline register (a stall), so a stalled loop resumes exactly where
// it stopped; in the combinational version it gates valid_o. The enable is
// this design's addition. Registers reset to zero on rst_ni low; with
// PIPELINED = 0 there are none, and clk_i and rst_ni are unused.
module ld_controller
  import ld_pkg::*;
#(
  parameter bit PIPELINED      = 1'b0,
  parameter bit USE_CORRECTION = 1'b0
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  input  logic              en_i,       // advance the pipeline; low = stall
  input  logic              valid_i,
  input  logic [ERR_W-1:0]  err_i,
  input  logic [RATE_W-1:0] rate_i,
  input  logic              mirror_i,
  output logic              valid_o,
  output ctl_out_t          u_o
);

  // ---------------------------------------------------------------- fuzzify
  lmf_t le [NMF];
  lmf_t lr [NMF];

  ld_fuzzifier u_fuzzifier (
    .err_i(err_i), .rate_i(rate_i), .le_o(le), .lr_o(lr)
  );

  // ------------------------------------------------------------ inference
  lmf_t a0 [NRULE];
  lc_t  s0 [NRULE];
  logic n0 [NRULE];

  ld_inference u_inference (
    .le_i(le), .lr_i(lr), .a_o(a0), .s_o(s0), .neg_o(n0)
  );

  // stage 1 register
  lmf_t a1r [NRULE];
  lc_t  s1r [NRULE];
  logic n1r [NRULE];
  logic m1r, v1r;

  // -------------------------------------------------------- SUB1, COMP1/2
  ld_t  d1, d2, amin1, amin2;
  logic dneg;

  ld_defuzz_select u_select (
    .a_i(a1r), .s_i(s1r), .neg_i(n1r),
    .d1_o(d1), .d2_o(d2), .a1_o(amin1), .a2_o(amin2), .neg_o(dneg)
  );

  // stage 2 register
  ld_t  d1r, d2r, am1r, am2r;
  logic neg2r, v2r;

  // ----------------------------------------------------------- CORRECTION
  ld_t lo;

  ld_correction #(.USE_CORRECTION(USE_CORRECTION)) u_correction (
    .d1_i(d1r), .d2_i(d2r), .a1_i(am1r), .a2_i(am2r), .lo_o(lo)
  );

  // ------------------------------------------------------ EXP_LUT3, sign
  ctl_out_t u;

  ld_output_stage u_out (
    .lo_i(lo), .neg_i(neg2r), .u_o(u)
  );

  if (PIPELINED) begin : g_pipe
    always_ff @(posedge clk_i or negedge rst_ni) begin
      if (!rst_ni) begin
        for (int k = 0; k < NRULE; k++) begin
          a1r[k] <= '0;
          s1r[k] <= '0;
          n1r[k] <= 1'b0;
        end
        m1r   <= 1'b0;
        v1r   <= 1'b0;
        d1r   <= '0;
        d2r   <= '0;
        am1r  <= '0;
        am2r  <= '0;
        neg2r <= 1'b0;
        v2r   <= 1'b0;
        u_o   <= '0;
        valid_o <= 1'b0;
      end else if (en_i) begin
        a1r   <= a0;                  // stage 1
        s1r   <= s0;
        n1r   <= n0;
        m1r   <= mirror_i;
        v1r   <= valid_i;
        d1r   <= d1;                  // stage 2
        d2r   <= d2;
        am1r  <= amin1;
        am2r  <= amin2;
        neg2r <= dneg ^ m1r;
        v2r   <= v1r;
        u_o   <= u;                   // stage 3
        valid_o <= v2r;
      end
    end
  end else begin : g_comb
    always_comb begin
      a1r   = a0;
      s1r   = s0;
      n1r   = n0;
      m1r   = mirror_i;
      v1r   = valid_i;
      d1r   = d1;
      d2r   = d2;
      am1r  = amin1;
      am2r  = amin2;
      neg2r = dneg ^ m1r;
      v2r   = v1r;
      u_o   = u;
      valid_o = v2r & en_i;
    end
  end

endmodule
