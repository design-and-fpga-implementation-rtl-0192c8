// ld_exp_rom -- exponential lookup table (EXP_LUT1, EXP_LUT2, EXP_LUT3).
//
// Holds 2^AW rows. The address is read as a fixed-point number a with
// AFRAC fraction bits, two's complement if ADDR_SIGNED; row a stores
// exp(-a) if NEGATE, else exp(a), as an unsigned number with DFRAC fraction
// bits, rounded to nearest and saturated at 2^DW - 1.
//
// The default is EXP_LUT3 of the published design: 4096 rows addressed by
// a log value with 1 sign, 3 integer and 8 fraction bits (-8 .. +7.996),
// producing a 19 bit magnitude with 7 integer and 12 fraction bits (the
// sign bit of the 20 bit controller output is added by the caller). The
// correction factor uses the same table with NEGATE = 1 and an unsigned
// address, the magnitude of a non-positive log difference. The table is a
// constant computed at elaboration from the formula and read
// combinationally.
module ld_exp_rom #(
  parameter int unsigned AW          = 12,
  parameter int unsigned AFRAC       = 8,
  parameter bit          ADDR_SIGNED = 1'b1,
  parameter bit          NEGATE      = 1'b0,
  parameter int unsigned DW          = 19,
  parameter int unsigned DFRAC       = 12
) (
  input  logic [AW-1:0] addr_i,
  output logic [DW-1:0] data_o
);

  typedef logic [DW-1:0] rom_t [2**AW];

  function automatic rom_t make_rom();
    rom_t r;
    for (int a = 0; a < 2**AW; a++) begin
      real x, v;
      x = real'(a);
      if (ADDR_SIGNED && a >= 2**(AW-1)) x = x - real'(2**AW);
      x = x / real'(2**AFRAC);
      if (NEGATE) x = -x;
      v = $exp(x) * real'(2**DFRAC) + 0.5;
      if (v >= real'(2**DW - 1)) r[a] = '1;
      else                       r[a] = DW'($rtoi(v));
    end
    return r;
  endfunction

  localparam rom_t ROM = make_rom();

  assign data_o = ROM[addr_i];

endmodule
