// cgen: C-GEN, the first half of the two-step carry-lookahead adder that
// assimilates -M*d (division) or -T (square root) into register R.
//
// From the carry-save pair (a, b) it forms the propagate bits p = a ^ b and,
// with a parallel-prefix (Kogge-Stone) network of generate/propagate pairs,
// the carry into every bit position. Register R stores {p, carries}; the sum
// is only formed later by S-GEN (p ^ carries), so the sum XOR is moved out of
// this cycle and overlaps the recoding in the next one. Combinational.
module cgen #(
  parameter int W = 87
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] p,
  output logic [W-1:0] cin     // carry into each bit (cin[0] = 0)
);
  always_comb begin
    logic [W-1:0] g, pp, gn, pn;
    g  = a & b;
    pp = a ^ b;
    for (int d = 1; d < W; d = d * 2) begin
      gn = g;
      pn = pp;
      for (int i = d; i < W; i++) begin
        gn[i] = g[i] | (pp[i] & g[i-d]);
        pn[i] = pp[i] & pp[i-d];
      end
      g  = gn;
      pp = pn;
    end
    p   = a ^ b;
    cin = {g[W-2:0], 1'b0};
  end
endmodule
