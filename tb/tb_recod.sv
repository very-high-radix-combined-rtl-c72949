// tb_recod: random carry-save estimates into RECOD. The rounded value must be
// floor((sum + carry)/8 + 1/2) taken modulo the output width, and the radix-4
// digits must each lie in -2..2 and add up to that value.
module tb_recod;
  import dsq_pkg::*;
  localparam int B  = 9;
  localparam int RW = riw(B) + rfw();

  logic [RW-1:0] y_sum = '0, y_carry = '0;
  logic signed [riw(B)-1:0] s_int;
  r4d_t [nd(B)-1:0] dig;
  int checks = 0, failures = 0;

  recod #(.B(B)) dut (.y_sum, .y_carry, .s_int, .dig);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [RW-1:0] tot;
    logic signed [riw(B)-1:0] ref_s;
    longint acc;
    for (int i = 0; i < 4000; i++) begin
      y_sum   = RW'($urandom);
      y_carry = RW'($urandom);
      #1;
      tot   = y_sum + y_carry + RW'(4);
      ref_s = $signed(tot[RW-1:3]);
      acc = 0;
      for (int k = nd(B) - 1; k >= 0; k--) begin
        acc = acc * 4 + longint'(dig[k]);
        if (dig[k] > 2 || dig[k] < -2) failures++;
      end
      checks += 2;
      if (s_int != ref_s) begin
        failures++;
        $display("FAIL s=%0d ref=%0d", s_int, ref_s);
      end
      if (acc != longint'(ref_s)) begin
        failures++;
        $display("FAIL digits=%0d ref=%0d", acc, ref_s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
