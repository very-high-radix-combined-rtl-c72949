// divsqrt_unit: combined very-high-radix division and square root with
// prescaling and result-digit selection by rounding.
//
// Division q = x/d: both operands are first multiplied by a scaling factor
// M ~ 1/d, so that the scaled divisor M*d is within a fraction of an ulp of
// radix r of 1. Each quotient digit is then simply the rounded, truncated
// estimate of r*w. Square root uses the same trick on a rescaled recurrence:
// with M ~ 1/sqrt(x), T = M*S (S the partial root) stays close to 1 and the
// root digits are again obtained by rounding. M comes from a linear
// approximation C - A*delta whose coefficients are read from TABD or TABS.
//
// Datapath (names as in the block diagram): TABD/TABS -> MUX1 -> L-MUL (with
// MUX2 choosing delta) -> MUX3 -> RECOD, which both rounds 2^m*P into the
// radix-4 digits of M and selects result digits from W-hat. MAC updates the
// carry-save residual W (multiplicand from MUX5, accumulation from MUX6). MUL
// (multiplicand from MUX4) forms -M*d or -t = -M*s; ADD assimilates -t for
// cycle B, CSA adds -t r^-J to -T, and the two-step adder C-GEN / S-GEN with
// register R in between assimilates -M*d or -T. CONV turns M back into binary
// for the M register; OTFC builds the result on the fly.
//
// Interface: when idle, `start` samples `op` and the operands. Operands are
// n-bit fractions (value = integer * 2^-n):
//   division     x, d in [1/2, 1)      -> res_trunc = floor(x/d * 2^(b*ceil(n/b) - 1))
//   square root  x in [1/4, 1)         -> res_trunc = floor(sqrt(x) * 2^(k + b*(ceil((n-3)/b) - 1)))
// (k = b+3). res_rnd is res_trunc without its last bit, rounded to nearest
// even using the final residual as sticky; `inexact` flags any discarded
// value. `done` pulses when the outputs are valid: 3 + ceil(n/b) cycles after
// the start edge for division (9 at n=54, b=9) and 3 + 2 ceil((n-3)/b) for
// square root (15).
//
// Choices of this design where the text is silent: the dividend enters the
// residual halved (w[0] = M x / 2), which keeps the first quotient digit at
// most r for x/d up to 2; the residual estimate keeps 3 fractional bits of
// each carry-save vector; the residual format is wide enough that every step
// is exact; the r^-J alignment of t is a shift of M in front of MUL.
module divsqrt_unit
  import dsq_pkg::*;
#(
  parameter int N = 54,
  parameter int B = 9
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  op_e                   op,
  input  logic [N-1:0]          x,
  input  logic [N-1:0]          d,
  output logic                  busy,
  output logic                  done,
  output logic [resw(N,B)-1:0]  res_trunc,
  output logic [resw(N,B)-2:0]  res_rnd,
  output logic                  inexact
);
  localparam int WW  = ww(N, B);
  localparam int FW  = fw(N, B);
  localparam int MF  = mf(B);
  localparam int K   = kk(B);
  localparam int LF  = lf(B);
  localparam int AFL = LF - tau_s(B) - hb(B);   // A fraction bits at L-MUL
  localparam int RI  = riw(B);
  localparam int RWD = riw(B) + rfw();          // recoder input width
  localparam int HW  = RWD + 1;                 // W-hat vector width
  localparam int TD  = tau_d(B);
  localparam int TS  = tau_s(B);
  localparam int H   = hb(B);

  // ---------------- sequencer and operand registers ----------------
  ctl_t        ctl;
  logic [7:0]  j;
  op_e         op_q;

  dsq_ctrl #(.N(N), .B(B)) u_ctrl (
    .clk, .rst_n, .start, .op, .ctl, .j, .op_q, .busy, .done
  );

  logic [N-1:0] xr, dr;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xr <= '0;
      dr <= '0;
    end else if (start && !busy) begin
      xr <= x;
      dr <= d;
    end
  end

  // ---------------- scaling factor: tables, MUX1, MUX2, L-MUL ----------------
  logic [cdf(B)-1:0] cd;
  logic [adf(B)+1:0] ad;
  logic [csf(B)-1:0] cs;
  logic [asf(B)+1:0] as_;

  tabd #(.B(B)) u_tabd (.addr(dr[N-2 -: TD-1]), .c_frac(cd), .a_coef(ad));
  tabs #(.B(B)) u_tabs (.addr(xr[N-1 -: TS]),   .c_frac(cs), .a_coef(as_));

  logic [LF:0]    c_sel;     // MUX1
  logic [AFL+1:0] a_sel;
  logic [H:0]     delta;     // MUX2
  always_comb begin
    if (op_q == OP_DIV) begin
      c_sel = {1'b1, cd, {(LF - cdf(B)){1'b0}}};
      a_sel = {ad, {(AFL - adf(B)){1'b0}}};
      delta = {dr[N-1-TD -: H], 1'b0};
    end else begin
      c_sel = {1'b1, cs, {(LF - csf(B)){1'b0}}};
      a_sel = (AFL+2)'(as_) << (AFL - asf(B));
      delta = {1'b0, xr[N-1-TS -: H]};
    end
  end

  logic [RI+1:0] p_s, p_c;
  lmul #(.B(B)) u_lmul (.c_in(c_sel), .a_in(a_sel), .delta(delta), .p_sum(p_s), .p_carry(p_c));

  // ---------------- registers W, W-hat, R, M ----------------
  logic [WW-1:0] w_s, w_c;            // residual, carry-save
  logic [HW-1:0] wh_s, wh_c;          // truncated residual
  logic [WW-1:0] r_p, r_c;            // -Md / -T as {propagate, carry}
  logic signed [RI-1:0] m_reg;        // 2^m * M, binary

  // ---------------- MUX3 and RECOD ----------------
  logic [RWD-1:0] y_s, y_c;
  always_comb begin
    unique case (ctl.m3)
      M3_RW:   begin y_s = wh_s[HW-1:1]; y_c = wh_c[HW-1:1]; end
      M3_2RW:  begin y_s = wh_s[HW-2:0]; y_c = wh_c[HW-2:0]; end
      default: begin y_s = {p_s, 1'b0};  y_c = {p_c, 1'b0};  end
    endcase
  end

  logic signed [RI-1:0] s_int;
  r4d_t [nd(B)-1:0]     dig;
  recod #(.B(B)) u_recod (.y_sum(y_s), .y_carry(y_c), .s_int(s_int), .dig(dig));

  logic signed [RI-1:0] m_bin;
  conv #(.B(B)) u_conv (.dig(dig), .m_bin(m_bin));

  // ---------------- MUX4, MUL, ADD ----------------
  logic [WW-1:0] mul_in, t_s, t_c, t_neg, t_half;
  always_comb begin
    if (ctl.m4 == M4_D)
      mul_in = WW'(dr) << (FW - N - MF);
    else
      mul_in = WW'(m_reg) << (FW - MF - K - B * int'(j));
  end

  mul #(.N(N), .B(B)) u_mul (.mcand(mul_in), .dig(dig), .p_sum(t_s), .p_carry(t_c));
  cpa #(.W(WW)) u_add (.a(t_s), .b(t_c), .y(t_neg));          // -t r^-J
  assign t_half = {t_neg[WW-1], t_neg[WW-1:1]};                // -t r^-J / 2

  // ---------------- S-GEN, CSA, MUX7, C-GEN ----------------
  logic [WW-1:0] r_neg, cs_s, cs_c, g_a, g_b, g_p, g_c;
  sgen #(.W(WW)) u_sgen (.p(r_p), .cin(r_c), .y(r_neg));
  csa  #(.W(WW)) u_csa  (.x(r_neg), .y(t_s), .z(t_c), .s(cs_s), .c(cs_c));
  assign g_a = (ctl.m7 == M7_CSA) ? cs_s : t_s;
  assign g_b = (ctl.m7 == M7_CSA) ? cs_c : t_c;
  cgen #(.W(WW)) u_cgen (.a(g_a), .b(g_b), .p(g_p), .cin(g_c));

  // ---------------- MUX5, MUX6, MAC ----------------
  logic [WW-1:0] mac_in, acc0, acc1, mw_s, mw_c;
  always_comb begin
    unique case (ctl.m5)
      M5_XS:   mac_in = WW'(xr) << (FW - N - MF + 2);   // 2^(2-m) x
      M5_XD:   mac_in = WW'(xr) << (FW - N - MF - 1);   // 2^-m x / 2
      M5_HT:   mac_in = t_half;
      default: mac_in = r_neg;
    endcase
    unique case (ctl.m6)
      M6_W:    begin acc0 = w_s;      acc1 = w_c;      end
      M6_RW:   begin acc0 = w_s << B; acc1 = w_c << B; end
      default: begin acc0 = '0;       acc1 = '0;       end
    endcase
  end

  mac #(.N(N), .B(B)) u_mac (.mcand(mac_in), .dig(dig), .acc0(acc0), .acc1(acc1),
                             .w_sum(mw_s), .w_carry(mw_c));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_s   <= '0;  w_c  <= '0;
      wh_s  <= '0;  wh_c <= '0;
      r_p   <= '0;  r_c  <= '0;
      m_reg <= '0;
    end else begin
      if (ctl.ld_w)  begin w_s <= mw_s; w_c <= mw_c; end
      if (ctl.ld_wh) begin
        wh_s <= mw_s[FW-B-4 +: HW];
        wh_c <= mw_c[FW-B-4 +: HW];
      end
      if (ctl.clr_r)     begin r_p <= '0;  r_c <= '0;  end
      else if (ctl.ld_r) begin r_p <= g_p; r_c <= g_c; end
      if (ctl.ld_m) m_reg <= m_bin;
    end
  end

  // ---------------- last residual, OTFC ----------------
  logic [WW-1:0] w_fin;
  cpa #(.W(WW)) u_sign (.a(w_s), .b(w_c), .y(w_fin));

  otfc #(.N(N), .B(B)) u_otfc (
    .clk, .rst_n,
    .clr(ctl.q_clr), .dig_en(ctl.q_dig), .s(s_int),
    .fin(ctl.fin), .w_neg(w_fin[WW-1]), .w_nz(|w_fin),
    .res_trunc, .res_rnd, .inexact
  );

  // ---------------- checks ----------------
  // Operands must be normalised; every digit after the first must satisfy
  // |s| <= r-1 (the convergence condition the scaling interval guarantees).
  a_div_operands: assert property (@(posedge clk) disable iff (!rst_n)
      (start && !busy && op == OP_DIV) |-> (x[N-1] && d[N-1]))
    else $error("division operands not in [1/2,1)");
  a_sqrt_operand: assert property (@(posedge clk) disable iff (!rst_n)
      (start && !busy && op == OP_SQRT) |-> (x[N-1:N-2] != 2'b00))
    else $error("square-root operand not in [1/4,1)");
  a_digit_range: assert property (@(posedge clk) disable iff (!rst_n)
      (ctl.q_dig && j != 0) |-> (s_int <= (1 << B) - 1 && s_int >= -((1 << B) - 1)))
    else $error("result digit out of range");
endmodule
