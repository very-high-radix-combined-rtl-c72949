// tb_mac: random multiplicands, digit vectors and two accumulation lines into
// MAC; the carry-save result must add up to mcand*digits + acc0 + acc1,
// modulo 2^ww.
module tb_mac;
  import dsq_pkg::*;
  localparam int N = 54, B = 9, W = ww(N, B);

  logic [W-1:0] mcand = '0, acc0 = '0, acc1 = '0, w_sum, w_carry;
  r4d_t [nd(B)-1:0] dig = '0;
  int checks = 0, failures = 0;

  mac #(.N(N), .B(B)) dut (.mcand, .dig, .acc0, .acc1, .w_sum, .w_carry);

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
      acc0  = W'({$urandom, $urandom, $urandom});
      acc1  = (i % 3 == 0) ? '0 : W'({$urandom, $urandom, $urandom});
      sd = 0;
      for (int k = nd(B) - 1; k >= 0; k--) begin
        dig[k] = r4d_t'(int'($urandom_range(4)) - 2);
        sd = sd * 4 + longint'(dig[k]);
      end
      #1;
      expv = mcand * W'(sd) + acc0 + acc1;
      checks++;
      if (W'(w_sum + w_carry) != expv) begin
        failures++;
        $display("FAIL mcand=%h sd=%0d", mcand, sd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
