// ld_fuzzifier -- log-domain fuzzifier: two lookup tables, one per input.
//
// Each input addresses a table of 2^10 rows. A row holds, for the five
// triangular membership functions NB, NM, ZR, PM, PB centred at -2W, -W, 0,
// W, 2W (NB and PB saturate to 1 outside them), the value -ln(mu) in
// unsigned 4.12 fixed point. Because every ln(mu) is <= 0 only the magnitude
// is stored. A membership of 0, or one whose log magnitude does not fit,
// stores the largest code (about 16), which never wins a later minimum.
//
// The error table is addressed by the error (unsigned 2.8, W = 1). The rate
// table is addressed by the magnitude of a non-positive rate of change
// (unsigned 6.4, W = 50), so its row r holds the memberships of -r. Both
// tables are read combinationally: the fuzzifier adds no clock cycle.
//
// Table sizes, formats, the W values and the sign conventions follow the
// published implementation. The tables are constants computed at
// elaboration from the formula above, rounding to the nearest code.
module ld_fuzzifier
  import ld_pkg::*;
#(
  parameter int unsigned ERR_WIDTH  = 256,  // W of the error functions, in error LSBs (1.0)
  parameter int unsigned RATE_WIDTH = 800   // W of the rate functions, in rate LSBs (50.0)
) (
  input  logic [ERR_W-1:0]  err_i,   // error, unsigned 2.8
  input  logic [RATE_W-1:0] rate_i,  // |rate| of a falling error, unsigned 6.4
  output lmf_t              le_o [NMF],   // -ln(mu) of the error, NB..PB
  output lmf_t              lr_o [NMF]    // -ln(mu) of the rate,  NB..PB
);

  // one table row: the five codes, NB in the lowest bits
  typedef logic [NMF*LMF_W-1:0] row_t;
  typedef row_t err_rom_t  [2**ERR_W];
  typedef row_t rate_rom_t [2**RATE_W];

  // -ln of the membership of x in triangle k (0..4) of width w (x and w in
  // input LSBs), as a stored code.
  function automatic lmf_t mf_code(real x, int k, real w);
    real  c, m, v;
    lmf_t code;
    c = real'(k - 2) * w;
    m = 1.0 - ((x > c) ? (x - c) : (c - x)) / w;
    if ((k == 0 && x <= c) || (k == NMF-1 && x >= c)) m = 1.0;
    code = LMF_ZERO;
    if (m > 0.0) begin
      v = -$ln(m) * real'(1 << LOG_FRAC) + 0.5;
      if (v < real'(LMF_ZERO)) code = lmf_t'($rtoi(v));
    end
    return code;
  endfunction

  function automatic err_rom_t make_err_rom();
    err_rom_t r;
    row_t     row;
    for (int a = 0; a < 2**ERR_W; a++) begin
      for (int k = 0; k < NMF; k++)
        row[k*LMF_W +: LMF_W] = mf_code(real'(a), k, real'(ERR_WIDTH));
      r[a] = row;
    end
    return r;
  endfunction

  function automatic rate_rom_t make_rate_rom();
    rate_rom_t r;
    row_t     row;
    for (int a = 0; a < 2**RATE_W; a++) begin
      for (int k = 0; k < NMF; k++)
        row[k*LMF_W +: LMF_W] = mf_code(-real'(a), k, real'(RATE_WIDTH));
      r[a] = row;
    end
    return r;
  endfunction

  localparam err_rom_t  ERR_ROM  = make_err_rom();
  localparam rate_rom_t RATE_ROM = make_rate_rom();

  row_t err_row, rate_row;

  assign err_row  = ERR_ROM[err_i];
  assign rate_row = RATE_ROM[rate_i];

  always_comb begin
    for (int k = 0; k < NMF; k++) begin
      le_o[k] = err_row[k*LMF_W +: LMF_W];
      lr_o[k] = rate_row[k*LMF_W +: LMF_W];
    end
  end

endmodule
