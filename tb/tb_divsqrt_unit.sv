// tb_divsqrt_unit: end-to-end test of the combined divide / square-root unit
// at its default size (n = 54, b = 9, radix 512).
//
// Runs directed corner cases and random operands through both operations and
// compares every result with a reference computed here with wide integer
// arithmetic: a long division for x/d and a bit-serial integer square root
// for sqrt(x). Checks the truncated result, the rounded result, the inexact
// flag and the latency (9 cycles for division, 15 for square root). It also
// counts how often each mechanism of the design was exercised and fails if
// one never was: negative result digits (the QM path of the on-the-fly
// converter), a negative final residual (correction), an exact result, a
// rounding increment, a first square-root digit above r, and each operation.
module tb_divsqrt_unit;
  import dsq_pkg::*;

  localparam int N  = 54;
  localparam int B  = 9;
  localparam int RW = resw(N, B);
  localparam int FD = B * it_div(N, B) - 1;             // quotient fraction bits
  localparam int FS = kk(B) + B * (it_sqrt(N, B) - 1);  // root fraction bits
  localparam int LAT_DIV  = 3 + it_div(N, B);
  localparam int LAT_SQRT = 3 + 2 * it_sqrt(N, B);
  localparam int NRAND = 400;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  op_e  op = OP_DIV;
  logic [N-1:0] x = '0, d = '0;
  logic busy, done, inexact;
  logic [RW-1:0] res_trunc;
  logic [RW-2:0] res_rnd;

  int checks = 0, failures = 0;
  int n_div = 0, n_sqrt = 0, n_negdig = 0, n_corr = 0, n_exact = 0, n_rup = 0, n_bigs1 = 0;

  divsqrt_unit dut (.*);

  always #5 clk = ~clk;

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism monitors
  always @(posedge clk) begin
    if (dut.ctl.q_dig && dut.s_int < 0) n_negdig++;
    if (dut.ctl.fin && dut.w_fin[ww(N,B)-1]) n_corr++;
    if (dut.ctl.q_dig && dut.op_q == OP_SQRT && dut.j == 0 && dut.s_int > (1 << B)) n_bigs1++;
  end

  function automatic logic [127:0] isqrt(input logic [127:0] v);
    logic [127:0] r, bit_;
    r = '0;
    bit_ = 128'd1 << 126;
    while (bit_ > v) bit_ >>= 2;
    while (bit_ != 0) begin
      if (v >= r + bit_) begin
        v = v - (r + bit_);
        r = (r >> 1) + bit_;
      end else r = r >> 1;
      bit_ >>= 2;
    end
    return r;
  endfunction

  task automatic run(input op_e o, input logic [N-1:0] xv, input logic [N-1:0] dv);
    logic [127:0] num, ref_t, rem;
    logic [RW-2:0] ref_r;
    logic ref_inx, g, st;
    int cyc;
    @(negedge clk);
    op = o; x = xv; d = dv; start = 1'b1;
    @(posedge clk);
    #1 start = 1'b0;
    cyc = 0;
    while (!done) begin
      @(posedge clk);
      #1 cyc++;
    end
    if (o == OP_DIV) begin
      n_div++;
      num   = {74'd0, xv} << FD;
      ref_t = num / {74'd0, dv};
      rem   = num - ref_t * {74'd0, dv};
    end else begin
      n_sqrt++;
      num   = {74'd0, xv} << (2 * FS - N);
      ref_t = isqrt(num);
      rem   = num - ref_t * ref_t;
    end
    g       = ref_t[0];
    st      = (rem != 0);
    ref_r   = ref_t[RW-1:1] + {{(RW-2){1'b0}}, g & (st | ref_t[1])};
    ref_inx = g | st;
    if (!st && !g) n_exact++;
    if (g && (st || ref_t[1])) n_rup++;
    checks += 4;
    if (res_trunc != ref_t[RW-1:0]) begin
      failures++;
      $display("FAIL %s x=%h d=%h trunc=%h ref=%h", o.name(), xv, dv, res_trunc, ref_t[RW-1:0]);
    end
    if (res_rnd != ref_r) begin
      failures++;
      $display("FAIL rnd %s x=%h d=%h got=%h ref=%h", o.name(), xv, dv, res_rnd, ref_r);
    end
    if (inexact != ref_inx) begin
      failures++;
      $display("FAIL inexact %s x=%h d=%h", o.name(), xv, dv);
    end
    if (cyc != ((o == OP_DIV) ? LAT_DIV : LAT_SQRT)) begin
      failures++;
      $display("FAIL latency %s: %0d cycles", o.name(), cyc);
    end
  endtask

  function automatic logic [N-1:0] rnd_op(input int lo_bits);
    logic [63:0] v;
    v = {$urandom, $urandom};
    return (N'(v) >> lo_bits) | (N'(1) << (N - lo_bits));
  endfunction

  initial begin
    logic [N-1:0] a, c;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // directed corners
    run(OP_DIV, {1'b1, {(N-1){1'b0}}}, {1'b1, {(N-1){1'b0}}});   // 1/2 / 1/2 = 1
    run(OP_DIV, {N{1'b1}}, {1'b1, {(N-1){1'b0}}});              // largest quotient
    run(OP_DIV, {1'b1, {(N-1){1'b0}}}, {N{1'b1}});              // smallest quotient
    run(OP_DIV, 54'h30000000000000, 54'h20000000000000);        // 0.75/0.5 exact
    run(OP_SQRT, 54'h10000000000000, '0);                       // sqrt(1/4) exact
    run(OP_SQRT, {N{1'b1}}, '0);
    run(OP_SQRT, 54'h24000000000000, '0);                       // sqrt(9/16) exact
    run(OP_SQRT, 54'h20000000000000, '0);                       // sqrt(1/2)
    // table-interval edges of both coefficient tables
    for (int i = 0; i < (1 << tau_s(B)); i++) begin
      if (i >= (1 << tau_s(B)) / 4) begin
        run(OP_SQRT, N'(i) << (N - tau_s(B)), '0);
        run(OP_SQRT, (N'(i) << (N - tau_s(B))) | ((N'(1) << (N - tau_s(B))) - 1), '0);
      end
    end
    for (int i = 0; i < (1 << (tau_d(B) - 1)); i++) begin
      c = (N'(1) << (N - 1)) | (N'(i) << (N - tau_d(B)));
      run(OP_DIV, {N{1'b1}}, c | ((N'(1) << (N - tau_d(B))) - 1));
      run(OP_DIV, c, c | ((N'(1) << (N - tau_d(B))) - 1));
      run(OP_DIV, rnd_op(1), c);
    end
    // random
    for (int i = 0; i < NRAND; i++) begin
      a = rnd_op(1);
      c = rnd_op(1);
      run(OP_DIV, a, c);
      a = rnd_op(2 - ($urandom & 1));
      run(OP_SQRT, a, '0);
    end
    // perfect squares: x = s^2 with s a 27-bit value in [2^26, 2^27)
    for (int i = 0; i < 20; i++) begin
      logic [26:0] s;
      logic [53:0] sq;
      s  = 27'h4000000 | 27'($urandom);
      sq = s * s;
      run(OP_SQRT, sq, '0);
    end
    $display("mechanisms: div=%0d sqrt=%0d negdigit=%0d correction=%0d exact=%0d roundup=%0d s1>r=%0d",
             n_div, n_sqrt, n_negdig, n_corr, n_exact, n_rup, n_bigs1);
    if (n_div == 0 || n_sqrt == 0 || n_negdig == 0 || n_corr == 0 || n_exact == 0 ||
        n_rup == 0 || n_bigs1 == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
