// sgen: S-GEN, the second half of the two-step adder: the sum bits
// y = p ^ cin from the propagate and carry vectors held in register R.
// Its output is -M*d (division) or -T[j] (square root) in two's complement.
// Combinational.
module sgen #(
  parameter int W = 87
) (
  input  logic [W-1:0] p,
  input  logic [W-1:0] cin,
  output logic [W-1:0] y
);
  assign y = p ^ cin;
endmodule
