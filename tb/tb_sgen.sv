// tb_sgen: S-GEN receives the propagate and carry vectors of random pairs
// (computed here by a ripple reference) and must return their sum a + b.
module tb_sgen;
  localparam int W = 87;
  logic [W-1:0] p = '0, cin = '0, y;
  int checks = 0, failures = 0;

  sgen #(.W(W)) dut (.p, .cin, .y);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] a, b, cy;
    for (int i = 0; i < 2000; i++) begin
      a = W'({$urandom, $urandom, $urandom});
      b = W'({$urandom, $urandom, $urandom});
      cy = '0;
      for (int k = 1; k < W; k++)
        cy[k] = (a[k-1] & b[k-1]) | ((a[k-1] ^ b[k-1]) & cy[k-1]);
      p   = a ^ b;
      cin = cy;
      #1;
      checks++;
      if (y != W'(a + b)) begin
        failures++;
        $display("FAIL a=%h b=%h", a, b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
