// csmul: carry-save multiply-accumulate array shared by L-MUL, MUL and MAC.
//
// Computes  sum + carry = mcand * SUM_i(dig[i] * 4^i) + acc0 + acc1  (mod 2^W)
// where dig[] are radix-4 signed digits in {-2..2}, least significant first.
// Each digit selects 0, +-mcand or +-2*mcand (a Booth partial product); a
// negative partial product is formed by inverting the selected value and
// adding the missing 1 in a separate "hot-one" row. The NDG partial products,
// the hot-one row and the two accumulation lines are reduced to two vectors by
// a linear array of 3:2 carry-save adders. Purely combinational. All values
// are two's complement modulo 2^W, so the result is exact whenever the true
// sum fits in W bits, even though each output vector alone may not.
// The adder-tree shape (4:2 and 3:2 levels in the text's delay estimate) is
// not modelled; the array here gives the same function.
module csmul
  import dsq_pkg::*;
#(
  parameter int W   = 32,
  parameter int NDG = 4
) (
  input  logic [W-1:0]     mcand,
  input  r4d_t [NDG-1:0]   dig,
  input  logic [W-1:0]     acc0,
  input  logic [W-1:0]     acc1,
  output logic [W-1:0]     sum,
  output logic [W-1:0]     carry
);
  localparam int NR = NDG + 3;

  logic [W-1:0] rows [NR];

  always_comb begin
    logic [W-1:0] sel, hot, s, c, a, b3, x;
    hot = '0;
    for (int i = 0; i < NDG; i++) begin
      unique case (dig[i])
        3'sd1, -3'sd1: sel = mcand;
        3'sd2, -3'sd2: sel = mcand << 1;
        default:       sel = '0;
      endcase
      // -(v * 4^i) = (~v) * 4^i + 4^i : invert, and put the 1 in the hot row
      if (dig[i] < 0) begin
        sel = ~sel;
        if (2 * i < W) hot[2*i] = 1'b1;
      end
      rows[i] = sel << (2 * i);
    end
    rows[NDG]     = hot;
    rows[NDG + 1] = acc0;
    rows[NDG + 2] = acc1;
    // 3:2 reduction chain
    s = rows[0];
    c = rows[1];
    for (int i = 2; i < NR; i++) begin
      a  = s;
      b3 = c;
      x  = rows[i];
      s  = a ^ b3 ^ x;
      c  = ((a & b3) | (a & x) | (b3 & x)) << 1;
    end
    sum   = s;
    carry = c;
  end
endmodule
