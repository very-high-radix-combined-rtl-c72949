// dsq_ctrl: sequencer of the combined divide / square-root unit.
//
// A small state machine that steps the datapath through one operation and
// emits the multiplexer selects and register enables as a ctl_t word:
//   SET1, SET2  scaling: table look-up, L-MUL, rounding of M, and (at the end
//               of SET2) w[0] into W/W-hat plus -M*d (division) or 0 (square
//               root) into R and M into the M register. The look-up-to-MAC
//               path is a two-cycle path: nothing is registered after SET1.
//   DIV         one cycle per radix-r quotient digit, ceil(n/b) of them.
//   SQA, SQB    two cycles per square-root digit, ceil((n-3)/b) digits.
//               A: v = r w - T s -> W. B: w = v - t s r^-J / 2 -> W, W-hat;
//               T + t r^-J -> R. The digit is held in W-hat across A and B.
//   POST        sign / zero test of the last residual, correction, rounding.
// Cycle counts follow the text: 3 + ceil(n/b) for division and
// 3 + 2 ceil((n-3)/b) for square root, counted from the clock edge that
// samples `start` to the edge that raises `done`. `start` is accepted only
// while idle; `done` is a one-cycle pulse, the unit is idle again with it.
// `j` is the index of the current iteration (0 for the first digit).
module dsq_ctrl
  import dsq_pkg::*;
#(
  parameter int N = 54,
  parameter int B = 9
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  op_e         op,        // operation latched with start
  output ctl_t        ctl,
  output logic [7:0]  j,
  output op_e         op_q,
  output logic        busy,
  output logic        done
);
  typedef enum logic [2:0] {S_IDLE, S_SET1, S_SET2, S_DIV, S_SQA, S_SQB, S_POST} state_e;

  localparam int ND_DIV  = it_div(N, B);
  localparam int ND_SQRT = it_sqrt(N, B);

  state_e st;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= S_IDLE;
      j    <= '0;
      op_q <= OP_DIV;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          st   <= S_SET1;
          op_q <= op;
        end
        S_SET1: st <= S_SET2;
        S_SET2: begin
          j  <= '0;
          st <= (op_q == OP_DIV) ? S_DIV : S_SQA;
        end
        S_DIV: begin
          j <= j + 1'b1;
          if (int'(j) == ND_DIV - 1) st <= S_POST;
        end
        S_SQA: st <= S_SQB;
        S_SQB: begin
          j  <= j + 1'b1;
          st <= (int'(j) == ND_SQRT - 1) ? S_POST : S_SQA;
        end
        S_POST: begin
          st   <= S_IDLE;
          done <= 1'b1;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign busy = (st != S_IDLE);

  always_comb begin
    ctl       = '0;
    ctl.m3    = M3_P;
    ctl.m4    = M4_D;
    ctl.m5    = M5_R;
    ctl.m6    = M6_ZERO;
    ctl.m7    = M7_MUL;
    unique case (st)
      S_IDLE: ctl.q_clr = start;
      S_SET1: ;
      S_SET2: begin
        ctl.m5    = (op_q == OP_DIV) ? M5_XD : M5_XS;
        ctl.ld_w  = 1'b1;
        ctl.ld_wh = 1'b1;
        ctl.ld_r  = (op_q == OP_DIV);
        ctl.clr_r = (op_q == OP_SQRT);
        ctl.ld_m  = (op_q == OP_SQRT);
      end
      S_DIV: begin
        ctl.m3    = M3_RW;
        ctl.m6    = M6_RW;
        ctl.ld_w  = 1'b1;
        ctl.ld_wh = 1'b1;
        ctl.q_dig = 1'b1;
      end
      S_SQA: begin
        ctl.m3    = (j == 0) ? M3_2RW : M3_RW;
        ctl.m4    = M4_M;
        ctl.m6    = M6_RW;
        ctl.m7    = M7_CSA;
        ctl.ld_w  = 1'b1;
        ctl.q_dig = 1'b1;
      end
      S_SQB: begin
        ctl.m3    = (j == 0) ? M3_2RW : M3_RW;
        ctl.m4    = M4_M;
        ctl.m5    = M5_HT;
        ctl.m6    = M6_W;
        ctl.m7    = M7_CSA;
        ctl.ld_w  = 1'b1;
        ctl.ld_wh = 1'b1;
        ctl.ld_r  = 1'b1;
      end
      S_POST: ctl.fin = 1'b1;
      default: ;
    endcase
  end
endmodule
