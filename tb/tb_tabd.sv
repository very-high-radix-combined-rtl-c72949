// tb_tabd: checks every entry of the division coefficient table against the
// closed-form C and A, evaluated here in floating point and rounded to the
// stored precision (b = 9: C to 12, A to 6 fractional bits).
module tb_tabd;
  import dsq_pkg::*;
  localparam int B = 9;
  localparam int T = tau_d(B);

  logic [T-2:0]       addr = '0;
  logic [cdf(B)-1:0]  c_frac;
  logic [adf(B)+1:0]  a_coef;
  int checks = 0, failures = 0;

  tabd #(.B(B)) dut (.addr, .c_frac, .a_coef);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real i_, dr, den, c, a;
    longint ce, ae;
    i_ = 2.0 ** (-T);
    for (int k = 0; k < (1 << (T - 1)); k++) begin
      addr = k[T-2:0];
      #1;
      dr  = 0.5 + k * i_;
      den = 2.0 * dr * (dr + i_) + (i_ / 2.0) ** 2;
      c   = 2.0 * (dr + i_) / den;
      a   = 2.0 / den;
      ce  = longint'($floor(c * (2.0 ** cdf(B)) + 0.5)) - (longint'(1) << cdf(B));
      ae  = longint'($floor(a * (2.0 ** adf(B)) + 0.5));
      checks += 2;
      if (longint'(c_frac) != ce) begin
        failures++;
        $display("FAIL C[%0d] got %h exp %h", k, c_frac, ce);
      end
      if (longint'(a_coef) != ae) begin
        failures++;
        $display("FAIL A[%0d] got %h exp %h", k, a_coef, ae);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
