// otfc: OTFC, on-the-fly conversion of the signed result digits, followed by
// the final sign correction and rounding.
//
// Two registers hold the result so far, Q, and Q - ulp, QM. Each new digit s
// (integer, |s| < r except the first one) is appended without a carry chain:
//   Q  <- (s >= 0) ? Q*r + s       : QM*r + (r + s)
//   QM <- (s >  0) ? Q*r + (s - 1) : QM*r + (r + s - 1)
// For |s| < r these are concatenations. The first digit of a square root
// (up to 8r) or of a division (up to r) is larger than one radix-r position;
// it arrives while Q = 0 and QM = -1, where the same formulas still hold when
// the "concatenation" is carried out as an addition, which is what this
// model does for all digits.
// At `fin`, the sign and zero test of the last residual select the truncated
// result: Q if the residual is >= 0, otherwise QM. The least significant bit
// of that result is a guard bit; it is dropped and the result is rounded to
// nearest, ties to even, with the residual-non-zero flag as sticky bit.
// Timing: clr and dig take effect at the clock edge; res_* are registered at
// the edge that ends the `fin` cycle.
module otfc
  import dsq_pkg::*;
#(
  parameter int N = 54,
  parameter int B = 9
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      clr,
  input  logic                      dig_en,
  input  logic signed [riw(B)-1:0]  s,
  input  logic                      fin,
  input  logic                      w_neg,     // last residual < 0
  input  logic                      w_nz,      // last residual != 0
  output logic [resw(N,B)-1:0]      res_trunc, // exact result, truncated
  output logic [resw(N,B)-2:0]      res_rnd,   // guard bit removed, rounded
  output logic                      inexact
);
  localparam int RW = resw(N,B);

  logic [RW-1:0] q, qm;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q  <= '0;
      qm <= '1;
    end else if (clr) begin
      q  <= '0;
      qm <= '1;
    end else if (dig_en) begin
      q  <= (s >= 0) ? (q  << B) + RW'(s)
                     : (qm << B) + RW'(s) + RW'(1 << B);
      qm <= (s >  0) ? (q  << B) + RW'(s) - 1'b1
                     : (qm << B) + RW'(s) + RW'((1 << B) - 1);
    end
  end

  // final selection and rounding
  logic [RW-1:0]   t_sel;
  logic            g_bit;
  logic [RW-2:0]   t_rnd;
  assign t_sel = w_neg ? qm : q;
  assign g_bit = t_sel[0];
  assign t_rnd = t_sel[RW-1:1] + {{(RW-2){1'b0}}, g_bit & (w_nz | t_sel[1])};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_trunc <= '0;
      res_rnd   <= '0;
      inexact   <= 1'b0;
    end else if (fin) begin
      res_trunc <= t_sel;
      res_rnd   <= t_rnd;
      inexact   <= g_bit | w_nz;
    end
  end
endmodule
