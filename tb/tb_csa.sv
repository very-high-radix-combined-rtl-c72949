// tb_csa: random triples into the 3:2 carry-save adder row; s + c must equal
// x + y + z modulo 2^W, and s must be the bitwise parity.
module tb_csa;
  localparam int W = 87;
  logic [W-1:0] x = '0, y = '0, z = '0, s, c;
  int checks = 0, failures = 0;

  csa #(.W(W)) dut (.x, .y, .z, .s, .c);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      x = W'({$urandom, $urandom, $urandom});
      y = W'({$urandom, $urandom, $urandom});
      z = W'({$urandom, $urandom, $urandom});
      #1;
      checks += 2;
      if (W'(s + c) != W'(x + y + z)) begin
        failures++;
        $display("FAIL sum");
      end
      if (s != (x ^ y ^ z)) begin
        failures++;
        $display("FAIL parity");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
