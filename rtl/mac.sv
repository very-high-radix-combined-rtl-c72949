// mac: MAC, the carry-save multiply-accumulate unit that updates the residual.
//
//   (w_sum, w_carry) = mcand * digits + acc0 + acc1
// The multiplicand comes from MUX5, the multiplier is the recoder's radix-4
// digit vector (2^m*M during set-up, a result digit otherwise) and the two
// accumulation lines are the carry-save residual from MUX6 (w, r*w or zero).
//   * set-up:        2^-m * (x/2) * 2^m M  = M x / 2      (division w[0])
//                    2^(2-m) * x * 2^m M   = 4 M x        (square root w[0])
//   * division:      r w[j] + (-M d) q_{j+1}
//   * sqrt cycle A:  v = r w[j] + (-T[j]) s_{j+1}
//   * sqrt cycle B:  w[j+1] = v + (-t_{j+1} r^-J / 2) s_{j+1}
// The result is carry-save, modulo 2^ww. Combinational.
module mac
  import dsq_pkg::*;
#(
  parameter int N = 54,
  parameter int B = 9
) (
  input  logic [ww(N,B)-1:0] mcand,
  input  r4d_t [nd(B)-1:0]   dig,
  input  logic [ww(N,B)-1:0] acc0,
  input  logic [ww(N,B)-1:0] acc1,
  output logic [ww(N,B)-1:0] w_sum,
  output logic [ww(N,B)-1:0] w_carry
);
  csmul #(.W(ww(N,B)), .NDG(nd(B))) u_arr (
    .mcand (mcand),
    .dig   (dig),
    .acc0  (acc0),
    .acc1  (acc1),
    .sum   (w_sum),
    .carry (w_carry)
  );
endmodule
