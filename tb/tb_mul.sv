// tb_mul: random multiplicands and digit vectors into MUL; the carry-save
// output must add up to minus the product, modulo 2^ww (ww = 87 at n = 54,
// b = 9).
module tb_mul;
  import dsq_pkg::*;
  localparam int N = 54, B = 9, W = ww(N, B);

  logic [W-1:0] mcand = '0, p_sum, p_carry;
  r4d_t [nd(B)-1:0] dig = '0;
  int checks = 0, failures = 0;

  mul #(.N(N), .B(B)) dut (.mcand, .dig, .p_sum, .p_carry);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint sd;
    logic [W-1:0] expv;
    for (int i = 0; i < 3000; i++) begin
      mcand = W'({$urandom, $urandom, $urandom});
      sd = 0;
      for (int k = nd(B) - 1; k >= 0; k--) begin
        dig[k] = r4d_t'(int'($urandom_range(4)) - 2);
        sd = sd * 4 + longint'(dig[k]);
      end
      #1;
      expv = W'(0) - mcand * W'(sd);
      checks++;
      if (W'(p_sum + p_carry) != expv) begin
        failures++;
        $display("FAIL mcand=%h sd=%0d", mcand, sd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
