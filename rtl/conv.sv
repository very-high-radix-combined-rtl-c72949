// conv: CONV, converts the scaling factor M from the radix-4 signed-digit
// form produced by the recoder into two's complement binary, so that it can
// be stored in the M register and used as the multiplicand of MUL during the
// square-root iterations:  m_bin = SUM_i dig[i] * 4^i  (= 2^m * M).
// Combinational.
module conv
  import dsq_pkg::*;
#(
  parameter int B = 9
) (
  input  r4d_t [nd(B)-1:0]          dig,
  output logic signed [riw(B)-1:0]  m_bin
);
  always_comb begin
    logic signed [2*nd(B)+1:0] acc;
    acc = '0;
    for (int i = nd(B) - 1; i >= 0; i--)
      acc = (acc <<< 2) + (2*nd(B)+2)'(dig[i]);
    m_bin = acc[riw(B)-1:0];
  end
endmodule
