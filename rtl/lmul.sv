// lmul: L-MUL, the carry-save multiplier that evaluates the linear
// approximation of the scaling factor,  P = C - A * delta_h.
//
// The multiplier delta_h (an unsigned fraction, the operand bits that follow
// the table index) is Booth-recoded to radix-4 digits here and negated, so the
// array forms -A*delta_h directly; C enters as the single accumulation line.
// The result stays in carry-save form. Each of the two vectors is then
// truncated to m+2 fractional bits (m = b+5, the fractional bits of M), which
// is the truncation "to the second fractional bit of 2^m P" that the rounding
// of M in the recoder expects. The output vectors are taken from a wide enough
// internal array that their modular sum is exact. Combinational.
//
// Alignment (done by MUX1/MUX2 in the unit): c_in has lf(b) fractional bits
// and includes the integer bit; a_in has lf(b)-tau_s(b)-hb(b) fractional bits;
// delta has weight 2^-(tau_s+hb) per LSB.
module lmul
  import dsq_pkg::*;
#(
  parameter int B = 9
) (
  input  logic [lf(B):0]                 c_in,    // C, 1 integer bit
  input  logic [lf(B)-tau_s(B)-hb(B)+1:0] a_in,    // A, 2 integer bits
  input  logic [hb(B):0]                 delta,   // delta_h
  output logic [riw(B)+1:0]              p_sum,   // 2^m*P, 2 fractional bits
  output logic [riw(B)+1:0]              p_carry
);
  localparam int LF  = lf(B);
  localparam int M   = mf(B);
  localparam int LW0 = LF + 3;
  localparam int LW1 = LF - M + riw(B);
  localparam int LW  = (LW0 > LW1) ? LW0 : LW1;
  localparam int DB  = hb(B) + 1;              // delta bits
  localparam int NDL = DB / 2 + 1;             // digits for unsigned delta

  r4d_t [NDL-1:0] dig;
  logic [LW-1:0]  s, c;

  // radix-4 Booth recoding of the unsigned multiplier, digits negated
  always_comb begin
    logic [2*NDL:0] y;
    y = '0;
    y[DB:1] = delta;
    for (int i = 0; i < NDL; i++)
      dig[i] = r4d_t'(2 * int'(y[2*i+2]) - int'(y[2*i+1]) - int'(y[2*i]));
  end

  csmul #(.W(LW), .NDG(NDL)) u_arr (
    .mcand (LW'(a_in)),
    .dig   (dig),
    .acc0  (LW'(c_in)),
    .acc1  ('0),
    .sum   (s),
    .carry (c)
  );

  assign p_sum   = s[LF-M-2 +: riw(B)+2];
  assign p_carry = c[LF-M-2 +: riw(B)+2];
endmodule
