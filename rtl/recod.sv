// recod: RECOD, selection by rounding and radix-4 recoding.
//
// The input is an estimate in carry-save form: two vectors with 3 fractional
// bits (already truncated). The recoder adds them in a short adder, adds 1/2
// and keeps the integer part, i.e. it rounds the estimate to the nearest
// integer:  s = floor(y_hat + 1/2). The same hardware serves both uses of the
// unit: for a result digit s_{j+1} the input is r*w_hat (or 2r*w_hat for the
// first square-root digit), for the scaling factor it is 2^m*P and the output
// is 2^m*M. The integer s is then recoded into radix-4 signed digits
// (-2..2, least significant first) that drive the multipliers MAC and MUL;
// s itself goes to the on-the-fly converter. Combinational.
module recod
  import dsq_pkg::*;
#(
  parameter int B = 9
) (
  input  logic [riw(B)+rfw()-1:0] y_sum,    // estimate, 3 fractional bits
  input  logic [riw(B)+rfw()-1:0] y_carry,
  output logic signed [riw(B)-1:0] s_int,   // rounded value
  output r4d_t [nd(B)-1:0]         dig      // its radix-4 signed digits
);
  localparam int RW = riw(B) + rfw();

  logic [RW-1:0] est;

  assign est   = y_sum + y_carry + RW'(1 << (rfw() - 1));
  assign s_int = est[RW-1:rfw()];

  always_comb begin
    logic signed [2*nd(B)-1:0] se;
    logic [2*nd(B):0] y;
    se = (2*nd(B))'(s_int);   // signed, so the cast sign-extends
    y  = {se, 1'b0};
    for (int i = 0; i < nd(B); i++)
      dig[i] = r4d_t'(-2 * int'(y[2*i+2]) + int'(y[2*i+1]) + int'(y[2*i]));
  end
endmodule
