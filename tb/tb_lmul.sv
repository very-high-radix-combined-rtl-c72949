// tb_lmul: random coefficients and multipliers into L-MUL. The two output
// vectors, each truncated to m+2 fractional bits, must add up (modulo their
// width) to floor(2^(m+2) * (C - A*delta)) or one less.
module tb_lmul;
  import dsq_pkg::*;
  localparam int B  = 9;
  localparam int LF = lf(B);
  localparam int AF = LF - tau_s(B) - hb(B);
  localparam int PW = riw(B) + 2;

  logic [LF:0]    c_in = '0;
  logic [AF+1:0]  a_in = '0;
  logic [hb(B):0] delta = '0;
  logic [PW-1:0]  p_sum, p_carry;
  int checks = 0, failures = 0;

  lmul #(.B(B)) dut (.c_in, .a_in, .delta, .p_sum, .p_carry);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint exact, fl, got, diff;
    for (int i = 0; i < 3000; i++) begin
      c_in  = {1'b1, LF'($urandom)};
      a_in  = (AF+2)'($urandom);
      delta = (hb(B)+1)'($urandom);
      if (i == 0) begin c_in = {1'b1, {LF{1'b1}}}; a_in = '1; delta = '1; end
      #1;
      exact = longint'(c_in) - longint'(a_in) * longint'(delta);  // LF frac bits
      fl    = exact >>> (LF - mf(B) - 2);
      got   = longint'(PW'(p_sum + p_carry));
      diff  = (fl - got) & ((longint'(1) << PW) - 1);
      checks++;
      if (diff > 1) begin
        failures++;
        $display("FAIL c=%h a=%h delta=%h fl=%h got=%h", c_in, a_in, delta, fl, got);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
