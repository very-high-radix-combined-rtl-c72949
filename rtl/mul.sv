// mul: MUL, the second carry-save multiplier of the unit.
//
// It multiplies the multiplicand chosen by MUX4 by the recoder's radix-4
// digits and returns the NEGATED product in carry-save form (the digits are
// simply sign-flipped), because the unit keeps -T and -M*d in register R:
//   * division, set-up:      mcand = d * 2^-m,  digits = 2^m*M   ->  -M*d
//   * square root, cycle A:  mcand = M * r^-J,  digits = s_{j+1} ->  -t_{j+1} r^-J
// The shift by r^-J is applied to M before the array (by MUX4), so the
// product comes out already aligned to the residual format. Combinational;
// in square root its result is used through cycles A and B.
module mul
  import dsq_pkg::*;
#(
  parameter int N = 54,
  parameter int B = 9
) (
  input  logic [ww(N,B)-1:0] mcand,
  input  r4d_t [nd(B)-1:0]   dig,
  output logic [ww(N,B)-1:0] p_sum,
  output logic [ww(N,B)-1:0] p_carry
);
  r4d_t [nd(B)-1:0] ndig;

  always_comb
    for (int i = 0; i < nd(B); i++) ndig[i] = -dig[i];

  csmul #(.W(ww(N,B)), .NDG(nd(B))) u_arr (
    .mcand (mcand),
    .dig   (ndig),
    .acc0  ('0),
    .acc1  ('0),
    .sum   (p_sum),
    .carry (p_carry)
  );
endmodule
