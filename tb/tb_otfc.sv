// tb_otfc: feeds random signed digit strings (a large non-negative first
// digit, then digits in -(r-1)..r-1) into the on-the-fly converter, then a
// random residual sign and zero flag. The truncated result must equal the
// digits' weighted sum, minus one if the residual is negative; the rounded
// result and inexact flag are checked against round-to-nearest-even.
module tb_otfc;
  import dsq_pkg::*;
  localparam int N = 54, B = 9, RW = resw(N, B), ND = 6;

  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, dig_en = 1'b0, fin = 1'b0;
  logic w_neg = 1'b0, w_nz = 1'b0;
  logic signed [riw(B)-1:0] s = '0;
  logic [RW-1:0] res_trunc;
  logic [RW-2:0] res_rnd;
  logic inexact;
  int checks = 0, failures = 0;

  otfc #(.N(N), .B(B)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [127:0] v;
    logic [RW-1:0] t;
    logic [RW-2:0] rr;
    logic g, st;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      clr = 1'b1;
      @(negedge clk);
      clr = 1'b0;
      v = 0;
      for (int k = 0; k < ND; k++) begin
        if (k == 0) s = riw(B)'($urandom_range(8 << B));
        else        s = riw(B)'(int'($urandom_range(2 * (1 << B) - 2)) - ((1 << B) - 1));
        v = v * (1 << B) + 128'(s);
        dig_en = 1'b1;
        @(negedge clk);
      end
      dig_en = 1'b0;
      w_nz  = ($urandom_range(3) != 0);
      w_neg = w_nz && ($urandom_range(1) != 0);
      fin = 1'b1;
      @(negedge clk);
      fin = 1'b0;
      t  = RW'(v - 128'(w_neg));
      g  = t[0];
      st = w_nz;
      rr = t[RW-1:1] + {{(RW-2){1'b0}}, g & (st | t[1])};
      checks += 3;
      if (res_trunc != t) begin
        failures++;
        $display("FAIL trunc got=%h exp=%h", res_trunc, t);
      end
      if (res_rnd != rr) begin
        failures++;
        $display("FAIL rnd");
      end
      if (inexact != (g | st)) begin
        failures++;
        $display("FAIL inexact");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
