// ld_correction -- CORRECTION block of the log-domain defuzzifier.
//
// The defuzzified output is num/den with num = sum(fs_i c_i) and
// den = sum(fs_i). In the log domain ln(num) is approximated by its largest
// term D1, and ln(den) by ln(max fs) = -A1, so LO = ln(num/den) = D1 + A1.
// This plain form (USE_CORRECTION = 0) is the one built in the published
// FPGA controller and is the default here.
//
// With USE_CORRECTION = 1 the second largest terms are used as well, with
// ln(1 + x) replaced by x:
//   SUB2: diff1 = D2 - D1      EXP_LUT1: exp_diff1 = exp(diff1)
//   ADD1: term1 = D1 + exp_diff1
//   SUB3: diff2 = A1 - A2      EXP_LUT2: exp_diff2 = exp(diff2)
//   SUB4: term2 = exp_diff2 - A1
//   SUB5: LO    = term1 - term2
// Both differences are <= 0; the two tables are addressed by their
// magnitude with 8 fraction bits (0 .. 15.996, larger magnitudes saturate,
// where the exponential is already below one output step) and give a result
// with 12 fraction bits. Table formats are this design's choice.
//
// Purely combinational; all values signed with 12 fraction bits. d2_i and
// a2_i are used only with USE_CORRECTION = 1.
module ld_correction
  import ld_pkg::*;
#(
  parameter bit USE_CORRECTION = 1'b0
) (
  input  ld_t d1_i,
  input  ld_t d2_i,
  input  ld_t a1_i,
  input  ld_t a2_i,
  output ld_t lo_o
);

  if (USE_CORRECTION) begin : g_corr
    localparam int unsigned CAW = 12;
    localparam int unsigned SH  = LOG_FRAC - 8;

    ld_t diff1, diff2, mag1, mag2, term1, term2;
    logic [CAW-1:0] addr1, addr2;
    logic [12:0]    exp_diff1, exp_diff2;

    always_comb begin
      diff1 = d2_i - d1_i;                              // SUB2
      diff2 = a1_i - a2_i;                              // SUB3
      mag1  = -(diff1 >>> SH);
      mag2  = -(diff2 >>> SH);
      addr1 = (mag1 > ld_t'(2**CAW - 1)) ? '1 : mag1[CAW-1:0];
      addr2 = (mag2 > ld_t'(2**CAW - 1)) ? '1 : mag2[CAW-1:0];
    end

    ld_exp_rom #(.AW(CAW), .AFRAC(8), .ADDR_SIGNED(1'b0), .NEGATE(1'b1),
                 .DW(13), .DFRAC(LOG_FRAC)) u_exp_lut1 (
      .addr_i(addr1), .data_o(exp_diff1)
    );
    ld_exp_rom #(.AW(CAW), .AFRAC(8), .ADDR_SIGNED(1'b0), .NEGATE(1'b1),
                 .DW(13), .DFRAC(LOG_FRAC)) u_exp_lut2 (
      .addr_i(addr2), .data_o(exp_diff2)
    );

    always_comb begin
      term1 = d1_i + ld_t'({1'b0, exp_diff1});          // ADD1
      term2 = ld_t'({1'b0, exp_diff2}) - a1_i;          // SUB4
      lo_o  = term1 - term2;                            // SUB5
    end
  end else begin : g_plain
    assign lo_o = d1_i + a1_i;
  end

endmodule
