// tb_tabs: checks every used entry of the square-root coefficient table
// against the closed-form C and A, evaluated here in floating point and
// rounded to the stored precision (b = 9: C to 17, A to 8 fractional bits).
module tb_tabs;
  import dsq_pkg::*;
  localparam int B = 9;
  localparam int T = tau_s(B);

  logic [T-1:0]       addr = '0;
  logic [csf(B)-1:0]  c_frac;
  logic [asf(B)+1:0]  a_coef;
  int checks = 0, failures = 0;

  tabs #(.B(B)) dut (.addr, .c_frac, .a_coef);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real i_, x, den, c, a, x15;
    longint ce, ae;
    i_ = 2.0 ** (-T);
    for (int k = (1 << T) / 4; k < (1 << T); k++) begin
      addr = k[T-1:0];
      #1;
      x   = k * i_;
      x15 = x * $sqrt(x);
      den = 27648.0 * x**6 - 7344.0 * x**4 * i_**2 + 1620.0 * x**3 * i_**3
            + 36.0 * x**2 * i_**4 - 27.0 * x * i_**5 + i_**6;
      c   = 216.0 * (4.0*x - i_)**2 * x15 * (8.0*x*x + 4.0*x*i_ - i_*i_) / den;
      a   = 216.0 * (4.0*x - i_)**3 * x15 / den;
      ce  = longint'($floor(c * (2.0 ** csf(B)) + 0.5)) - (longint'(1) << csf(B));
      ae  = longint'($floor(a * (2.0 ** asf(B)) + 0.5));
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
