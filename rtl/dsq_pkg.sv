// dsq_pkg: shared types and width rules of the combined very-high-radix
// divide / square-root unit.
//
// All sizes derive from two numbers: n, the operand width in fractional bits,
// and b, the log2 of the radix r = 2^b. The functions below turn (n, b) into
// the widths every block uses, so a module only needs N and B parameters.
//
// Number formats used throughout the datapath:
//  * Residual domain ("common format"): two's complement, fw(n,b) fractional
//    bits and iw(b) integer bits including sign. W, R, the MAC, MUL, CSA and
//    adders all work in it, modulo 2^ww. fw is chosen so that every term of
//    both recurrences is exact (no rounding inside the loop).
//  * Result digits and the scaling factor M leave the recoder as a vector of
//    radix-4 signed digits in {-2..2} (type r4d_t), least significant first.
//  * The recoder input is a pair of carry-save vectors with 3 fractional bits.
package dsq_pkg;

  typedef enum logic {OP_DIV = 1'b0, OP_SQRT = 1'b1} op_e;

  // One radix-4 signed digit, value -2..2.
  typedef logic signed [2:0] r4d_t;

  // Fractional bits of the scaling factor M (m in the text).
  function automatic int mf(int b);   return b + 5; endfunction
  // Bits of the first square-root digit: S[1] = 2^-k * s1.
  function automatic int kk(int b);   return b + 3; endfunction
  // Iterations: division ceil(n/b); square root ceil((n-3)/b), each two cycles.
  function automatic int it_div(int n, int b);  return (n + b - 1) / b; endfunction
  function automatic int it_sqrt(int n, int b); return (n - 3 + b - 1) / b; endfunction
  // Fractional bits of the residual domain. Division needs n+1+m (w[0]=M*x/2);
  // square root needs m+k+1+b*(iterations-1) for the last t*s*r^-J term.
  function automatic int fw(int n, int b);
    int a, s;
    a = n + 1 + mf(b);
    s = mf(b) + kk(b) + 1 + b * (it_sqrt(n, b) - 1);
    return (a > s) ? a : s;
  endfunction
  // Integer bits (with sign) of the residual domain: holds 2r*w and 8r*M*x.
  function automatic int iw(int b);   return b + 6; endfunction
  function automatic int ww(int n, int b); return fw(n, b) + iw(b); endfunction
  // Recoder: integer bits (with sign) of its input and output; 3 fraction bits.
  function automatic int riw(int b);  return b + 9; endfunction
  function automatic int rfw();       return 3; endfunction
  // Number of radix-4 digits the recoder emits (covers 2^m*M and s1 <= 8r).
  function automatic int nd(int b);   return (riw(b) + 1) / 2; endfunction
  // Result register width: enough for the longer of the two results plus sign.
  function automatic int resw(int n, int b);
    int a, s;
    a = b * it_div(n, b);
    s = kk(b) + b * (it_sqrt(n, b) - 1);
    return ((a > s) ? a : s) + 2;
  endfunction

  // Coefficient tables (linear approximation of 1/d and 1/sqrt(x)).
  function automatic int tau_d(int b); return (b + 1) / 2 + 1; endfunction // d_r frac bits
  function automatic int tau_s(int b); return (b + 1) / 2 + 2; endfunction // x_tau frac bits
  function automatic int hb(int b);    return b / 2 + 4; endfunction       // delta_h bits
  function automatic int cdf(int b);   return b + 3; endfunction           // C frac, division
  function automatic int adf(int b);   return (b % 2 == 0) ? b / 2 + 3 : (b + 1) / 2 + 1; endfunction
  function automatic int csf(int b);   return b + 8; endfunction           // C frac, square root
  function automatic int asf(int b);   return (b + 1) / 2 + 3; endfunction // A frac, square root
  // Internal fraction bits of L-MUL (exact product A*delta_h and C).
  function automatic int lf(int b);
    int a, s;
    a = adf(b) + tau_d(b) + hb(b);
    s = asf(b) + tau_s(b) + hb(b);
    return (a > s) ? a : s;
  endfunction

  // ---- control word produced by the sequencer each cycle ----
  typedef enum logic [1:0] {M3_P, M3_RW, M3_2RW}          mux3_e; // recoder input
  typedef enum logic       {M4_D, M4_M}                   mux4_e; // MUL multiplicand
  typedef enum logic [1:0] {M5_XS, M5_XD, M5_HT, M5_R}    mux5_e; // MAC multiplicand
  typedef enum logic [1:0] {M6_ZERO, M6_W, M6_RW}         mux6_e; // MAC accumulation
  typedef enum logic       {M7_MUL, M7_CSA}               mux7_e; // C-GEN input

  typedef struct packed {
    mux3_e m3;
    mux4_e m4;
    mux5_e m5;
    mux6_e m6;
    mux7_e m7;
    logic  ld_w;     // load W (residual, carry-save)
    logic  ld_wh;    // load W-hat (truncated residual)
    logic  ld_r;     // load R from C-GEN
    logic  clr_r;    // clear R (T[0] = 0)
    logic  ld_m;     // load M from CONV
    logic  q_clr;    // reset the on-the-fly converter
    logic  q_dig;    // append the recoder's digit
    logic  fin;      // final correction and rounding
  } ctl_t;

endpackage
