// dsq_radix_runner: drives one divsqrt_unit instance of radix 2^B with random
// and corner operands for both operations, checks each result against a wide
// integer reference (long division, bit-serial integer square root) and the
// latency against 3 + ceil(n/b) and 3 + 2 ceil((n-3)/b) cycles. Used by
// tb_divsqrt_radix; reports its counts through its outputs when `fin` rises.
module dsq_radix_runner
  import dsq_pkg::*;
#(
  parameter int N     = 54,
  parameter int B     = 9,
  parameter int NRAND = 150
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   lat_div,
  output int   lat_sqrt,
  output logic fin
);
  localparam int RW = resw(N, B);
  localparam int FD = B * it_div(N, B) - 1;
  localparam int FS = kk(B) + B * (it_sqrt(N, B) - 1);

  logic start = 1'b0;
  op_e  op = OP_DIV;
  logic [N-1:0] x = '0, d = '0;
  logic busy, done, inexact;
  logic [RW-1:0] res_trunc;
  logic [RW-2:0] res_rnd;

  divsqrt_unit #(.N(N), .B(B)) dut (.*);

  function automatic logic [127:0] isqrt(input logic [127:0] v);
    logic [127:0] r, b2;
    r  = '0;
    b2 = 128'd1 << 126;
    while (b2 > v) b2 >>= 2;
    while (b2 != 0) begin
      if (v >= r + b2) begin
        v = v - (r + b2);
        r = (r >> 1) + b2;
      end else r = r >> 1;
      b2 >>= 2;
    end
    return r;
  endfunction

  task automatic run(input op_e o, input logic [N-1:0] xv, input logic [N-1:0] dv);
    logic [127:0] num, ref_t, rem;
    logic [RW-2:0] ref_r;
    logic g, st;
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
      num   = 128'(xv) << FD;
      ref_t = num / 128'(dv);
      rem   = num - ref_t * 128'(dv);
      lat_div = cyc;
    end else begin
      num   = 128'(xv) << (2 * FS - N);
      ref_t = isqrt(num);
      rem   = num - ref_t * ref_t;
      lat_sqrt = cyc;
    end
    g     = ref_t[0];
    st    = (rem != 0);
    ref_r = ref_t[RW-1:1] + {{(RW-2){1'b0}}, g & (st | ref_t[1])};
    checks += 3;
    if (res_trunc != ref_t[RW-1:0]) begin
      failures++;
      $display("FAIL b=%0d %s x=%h d=%h got=%h ref=%h", B, o.name(), xv, dv, res_trunc, ref_t[RW-1:0]);
    end
    if (res_rnd != ref_r || inexact != (g | st)) begin
      failures++;
      $display("FAIL b=%0d rounding %s x=%h d=%h", B, o.name(), xv, dv);
    end
    if (cyc != ((o == OP_DIV) ? 3 + it_div(N, B) : 3 + 2 * it_sqrt(N, B))) begin
      failures++;
      $display("FAIL b=%0d latency %s %0d", B, o.name(), cyc);
    end
  endtask

  function automatic logic [N-1:0] rnd_op(input int lead);
    logic [63:0] v;
    v = {$urandom, $urandom};
    return (N'(v) >> lead) | (N'(1) << (N - lead));
  endfunction

  initial begin
    checks = 0; failures = 0; lat_div = 0; lat_sqrt = 0; fin = 1'b0;
    @(posedge rst_n);
    run(OP_DIV, {N{1'b1}}, {1'b1, {(N-1){1'b0}}});
    run(OP_DIV, {1'b1, {(N-1){1'b0}}}, {N{1'b1}});
    run(OP_SQRT, {2'b01, {(N-2){1'b0}}}, '0);
    run(OP_SQRT, {N{1'b1}}, '0);
    for (int i = 0; i < (1 << tau_s(B)); i += 1 + (1 << tau_s(B)) / 64) begin
      if (4 * i >= (1 << tau_s(B))) begin
        run(OP_SQRT, N'(i) << (N - tau_s(B)), '0);
        run(OP_SQRT, (N'(i) << (N - tau_s(B))) | ((N'(1) << (N - tau_s(B))) - 1), '0);
      end
    end
    for (int i = 0; i < NRAND; i++) begin
      run(OP_DIV, rnd_op(1), rnd_op(1));
      run(OP_SQRT, rnd_op(2 - ($urandom & 1)), '0);
    end
    fin = 1'b1;
  end
endmodule
