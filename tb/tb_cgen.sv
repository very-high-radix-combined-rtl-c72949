// tb_cgen: random operand pairs into C-GEN. Propagate bits must be a ^ b and
// the carry into bit i must be bit i of (a + b) ^ a ^ b, the ripple-carry
// definition; long carry chains are forced with complementary operands.
module tb_cgen;
  localparam int W = 87;
  logic [W-1:0] a = '0, b = '0, p, cin;
  int checks = 0, failures = 0;

  cgen #(.W(W)) dut (.a, .b, .p, .cin);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] rc, cy;
    for (int i = 0; i < 3000; i++) begin
      a = W'({$urandom, $urandom, $urandom});
      b = (i % 4 == 0) ? ~a : W'({$urandom, $urandom, $urandom});
      if (i % 4 == 0) begin a[0] = 1'b1; b[0] = 1'b1; end
      #1;
      // ripple reference
      cy = '0;
      for (int k = 1; k < W; k++)
        cy[k] = (a[k-1] & b[k-1]) | ((a[k-1] ^ b[k-1]) & cy[k-1]);
      rc = cy;
      checks += 2;
      if (p != (a ^ b)) begin
        failures++;
        $display("FAIL p");
      end
      if (cin != rc) begin
        failures++;
        $display("FAIL carries a=%h b=%h", a, b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
