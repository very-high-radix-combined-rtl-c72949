// tb_cpa: random and corner operand pairs into the carry-propagate adder.
module tb_cpa;
  localparam int W = 87;
  logic [W-1:0] a = '0, b = '0, y;
  int checks = 0, failures = 0;

  cpa #(.W(W)) dut (.a, .b, .y);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W:0] ref_full;
    for (int i = 0; i < 2000; i++) begin
      a = W'({$urandom, $urandom, $urandom});
      b = W'({$urandom, $urandom, $urandom});
      if (i == 0) begin a = '1; b = W'(1); end
      #1;
      ref_full = {1'b0, a} + {1'b0, b};
      checks++;
      if (y != ref_full[W-1:0]) begin
        failures++;
        $display("FAIL a=%h b=%h y=%h", a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
