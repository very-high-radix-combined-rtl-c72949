// tb_divsqrt_radix: the radix sweep of the design's evaluation. Runs the unit
// at n = 54 with b = 11, 14 and 18 (radix 2048, 16384, 262144) next to the
// default b = 9, each with random and corner operands checked against an
// exact reference, and checks the cycle counts of the evaluation table:
//   b      9   11   14   18
//   div    9    8    7    6
//   sqrt  15   13   11    9
module tb_divsqrt_radix;
  localparam int NB = 4;
  localparam int BS [NB]       = '{9, 11, 14, 18};
  localparam int EXP_DIV [NB]  = '{9, 8, 7, 6};
  localparam int EXP_SQRT [NB] = '{15, 13, 11, 9};

  logic clk = 1'b0, rst_n = 1'b0;
  int   chk [NB], fl [NB], ld [NB], ls [NB];
  logic fin [NB];

  always #5 clk = ~clk;

  for (genvar g = 0; g < NB; g++) begin : g_radix
    dsq_radix_runner #(.N(54), .B(BS[g])) u_run (
      .clk, .rst_n, .checks(chk[g]), .failures(fl[g]),
      .lat_div(ld[g]), .lat_sqrt(ls[g]), .fin(fin[g])
    );
  end

  initial begin
    repeat (400000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end

  initial begin
    int checks, failures;
    bit all;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    do begin
      @(posedge clk);
      all = 1'b1;
      for (int i = 0; i < NB; i++) all &= fin[i];
    end while (!all);
    checks = 0; failures = 0;
    for (int i = 0; i < NB; i++) begin
      $display("b=%0d: division %0d cycles, square root %0d cycles, %0d checks, %0d failures",
               BS[i], ld[i], ls[i], chk[i], fl[i]);
      checks += chk[i] + 2;
      failures += fl[i];
      if (ld[i] != EXP_DIV[i])  failures++;
      if (ls[i] != EXP_SQRT[i]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
