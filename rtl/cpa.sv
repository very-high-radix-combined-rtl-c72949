// cpa: carry-propagate adder that assimilates a carry-save pair,
// y = a + b (mod 2^W). The unit uses it as ADD, to turn -t_{j+1} r^-J into
// non-redundant form during square-root cycle B, and again in the final cycle
// to obtain the last residual, whose sign and zero test drive the correction
// and rounding of the result. Combinational.
module cpa #(
  parameter int W = 87
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);
  assign y = a + b;
endmodule
