// ld_output_stage -- EXP_LUT3 and sign adjustment of the defuzzifier.
//
// Converts the log-domain result LO = ln|u| back to the crisp control
// value u = +-exp(LO). LO (18 bit signed, 12 fraction bits) is truncated to
// the table's 8 fraction bits; values below -8 give 0 (the exponential is
// then at most one output step), values above +7.996 use the last row,
// which saturates at 127.99. The magnitude is negated when neg_i is set,
// i.e. when the rule that dominated the numerator has a negative
// consequent. The output is 20 bit two's complement with 12 fraction bits.
// The table size and formats follow the published implementation; the
// handling of out-of-range LO is this design's choice.
//
// Purely combinational.
module ld_output_stage
  import ld_pkg::*;
(
  input  ld_t      lo_i,
  input  logic     neg_i,
  output ctl_out_t u_o
);

  localparam int unsigned SH = LOG_FRAC - EXP_AFR;

  ld_t                lo_q8;
  logic               underflow, overflow;
  logic [EXP_AW-1:0]  addr;
  logic [OUT_W-2:0]   mag;

  always_comb begin
    lo_q8     = lo_i >>> SH;
    underflow = lo_q8 < -ld_t'(2**(EXP_AW-1));
    overflow  = lo_q8 >  ld_t'(2**(EXP_AW-1) - 1);
    if (overflow) addr = {1'b0, {(EXP_AW-1){1'b1}}};
    else          addr = lo_q8[EXP_AW-1:0];
  end

  ld_exp_rom #(.AW(EXP_AW), .AFRAC(EXP_AFR), .ADDR_SIGNED(1'b1), .NEGATE(1'b0),
               .DW(OUT_W-1), .DFRAC(OUT_FRAC)) u_exp_lut3 (
    .addr_i(addr), .data_o(mag)
  );

  always_comb begin
    if (underflow)  u_o = '0;
    else if (neg_i) u_o = -ctl_out_t'({1'b0, mag});
    else            u_o =  ctl_out_t'({1'b0, mag});
  end

endmodule
