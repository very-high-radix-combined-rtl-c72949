// tabd: coefficient table for division (TABD).
//
// For the divisor d in [1/2,1), indexed by d_r, the divisor truncated to
// tau = ceil(b/2)+1 fractional bits (its first fractional bit is always 1 and
// is not an input, so the table has ceil(b/2) address bits). It returns the
// pair (C, A) of the linear approximation  M = C - A*(d_h - d_r)  of 1/d:
//     C = 2(d_r + I) / (2 d_r (d_r + I) + (I/2)^2)
//     A = 2          / (2 d_r (d_r + I) + (I/2)^2),      I = 2^-tau
// C is rounded to b+3 fractional bits and, since 1 <= C < 2, its integer bit
// is implied and not stored. A (1 < A <= 4) has 2 integer bits and
// b/2+3 (b even) or (b+1)/2+1 (b odd) fractional bits. Both are rounded to
// nearest. The contents are computed at elaboration time from the formulas
// above (double precision, then rounded), for any b. Combinational read
// (a ROM).
module tabd
  import dsq_pkg::*;
#(
  parameter int B = 9
) (
  input  logic [tau_d(B)-2:0]     addr,    // d fraction bits 2..tau
  output logic [cdf(B)-1:0]       c_frac,  // C - 1, b+3 fractional bits
  output logic [adf(B)+1:0]       a_coef   // A, 2 integer bits
);
  localparam int DW = cdf(B) + adf(B) + 2;
  localparam int NE = 1 << (tau_d(B) - 1);

  typedef logic [DW-1:0] rom_t [NE];

  function automatic rom_t build_rom();
    rom_t r;
    for (int k = 0; k < NE; k++) begin
      real i_, dr, den, c, a;
      longint ci, ai;
      i_  = 2.0 ** (-tau_d(B));
      dr  = 0.5 + k * i_;
      den = 2.0 * dr * (dr + i_) + (i_ / 2.0) * (i_ / 2.0);
      c   = 2.0 * (dr + i_) / den;
      a   = 2.0 / den;
      ci  = longint'($floor(c * (2.0 ** cdf(B)) + 0.5)) - (longint'(1) << cdf(B));
      ai  = longint'($floor(a * (2.0 ** adf(B)) + 0.5));
      r[k] = {cdf(B)'(ci), (adf(B)+2)'(ai)};
    end
    return r;
  endfunction

  localparam rom_t ROM = build_rom();

  assign {c_frac, a_coef} = ROM[addr];
endmodule
