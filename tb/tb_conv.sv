// tb_conv: random radix-4 signed-digit vectors into CONV; the binary output
// must equal the digits' weighted sum (as the recoder would produce for M).
module tb_conv;
  import dsq_pkg::*;
  localparam int B = 9;

  r4d_t [nd(B)-1:0] dig = '0;
  logic signed [riw(B)-1:0] m_bin;
  int checks = 0, failures = 0;

  conv #(.B(B)) dut (.dig, .m_bin);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint acc;
    for (int i = 0; i < 3000; i++) begin
      acc = 0;
      for (int k = nd(B) - 1; k >= 0; k--) begin
        dig[k] = r4d_t'(int'($urandom_range(4)) - 2);
        if (k == nd(B) - 1) dig[k] = (dig[k] < 0) ? r4d_t'(-1) : (dig[k] > 0 ? r4d_t'(1) : r4d_t'(0));
        acc = acc * 4 + longint'(dig[k]);
      end
      #1;
      checks++;
      if (longint'(m_bin) != acc) begin
        failures++;
        $display("FAIL got=%0d ref=%0d", m_bin, acc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
