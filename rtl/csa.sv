// csa: CSA, a row of 3:2 carry-save adders (full adders) that adds the
// carry-save term -t_{j+1} r^-J from MUL to -T[j] from register R, giving
// -T[j+1] in carry-save form for the two-step adder. Combinational,
// modulo 2^W.
module csa #(
  parameter int W = 87
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);
  assign s = x ^ y ^ z;
  assign c = ((x & y) | (x & z) | (y & z)) << 1;
endmodule
