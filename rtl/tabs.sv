// tabs: coefficient table for square root (TABS).
//
// For the operand x in [1/4,1), indexed by x_tau, x truncated to
// tau = ceil(b/2)+2 fractional bits, it returns (C, A) of the linear
// approximation  M = C - A*(x_h - x_tau)  of 1/sqrt(x). With I = 2^-tau and
//   D = 27648 x^6 - 7344 x^4 I^2 + 1620 x^3 I^3 + 36 x^2 I^4 - 27 x I^5 + I^6
//   C = 216 (4x - I)^2 x^(3/2) (8x^2 + 4xI - I^2) / D
//   A = 216 (4x - I)^3 x^(3/2) / D                       (x = x_tau)
// C is rounded to b+8 fractional bits with its integer bit (always 1) not
// stored; A has 2 integer bits and ceil(b/2)+3 fractional bits. Entries with
// x_tau < 1/4 are never addressed and hold zero. The contents are computed
// at elaboration time from the formulas above (double precision, then
// rounded), for any b. Combinational read (a ROM).
module tabs
  import dsq_pkg::*;
#(
  parameter int B = 9
) (
  input  logic [tau_s(B)-1:0]     addr,    // x fraction bits 1..tau
  output logic [csf(B)-1:0]       c_frac,  // C - 1, b+8 fractional bits
  output logic [asf(B)+1:0]       a_coef   // A, 2 integer bits
);
  localparam int DW = csf(B) + asf(B) + 2;
  localparam int NE = 1 << tau_s(B);

  typedef logic [DW-1:0] rom_t [NE];

  function automatic rom_t build_rom();
    rom_t r;
    for (int k = 0; k < NE; k++) begin
      real i_, x, x15, den, c, a;
      longint ci, ai;
      i_  = 2.0 ** (-tau_s(B));
      x   = k * i_;
      r[k] = '0;
      if (4 * k >= NE) begin
        x15 = x * $sqrt(x);
        den = 27648.0 * x**6 - 7344.0 * x**4 * i_**2 + 1620.0 * x**3 * i_**3
              + 36.0 * x**2 * i_**4 - 27.0 * x * i_**5 + i_**6;
        c   = 216.0 * (4.0*x - i_)**2 * x15 * (8.0*x*x + 4.0*x*i_ - i_*i_) / den;
        a   = 216.0 * (4.0*x - i_)**3 * x15 / den;
        ci  = longint'($floor(c * (2.0 ** csf(B)) + 0.5)) - (longint'(1) << csf(B));
        ai  = longint'($floor(a * (2.0 ** asf(B)) + 0.5));
        r[k] = {csf(B)'(ci), (asf(B)+2)'(ai)};
      end
    end
    return r;
  endfunction

  localparam rom_t ROM = build_rom();

  assign {c_frac, a_coef} = ROM[addr];
endmodule
