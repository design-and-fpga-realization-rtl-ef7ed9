// ecc_engine: elliptic-curve scalar point multiplier over GF(251).
//
// Computes Q = k * P on y^2 = x^3 + a*x + b (a from crypto_pkg) with the
// left-to-right double-and-add algorithm, one scalar bit per iteration,
// in affine coordinates. All field work goes through one gf_arith unit,
// one operation per clock, sequenced by a small microcode ROM:
//   IN   convert P and a into Montgomery form            (3 ops)
//   DBL  R = 2R:  l = (3x^2+a)/(2y), x' = l^2-2x, y' = l(x-x')-y  (14 ops)
//   ADD  R = R+P: l = (yp-y)/(xp-x), x' = l^2-x-xp, y' = l(x-x')-y (11 ops)
//   OUT  convert R back to normal form                   (2 ops)
// The field inversion inside DBL and ADD is one GF_INV operation: a
// 256-entry inverse table that gf_arith computes at elaboration, so the
// division costs one clock like a multiplication. The special cases of
// affine arithmetic (R at infinity, R = P, R = -P, y = 0) are decided by the
// control FSM between routines, so any point and scalar give the right
// result. Double-and-add, affine coordinates, Montgomery reduction and the
// field GF(251) follow the architecture description; the microcode split,
// the table inversion and the curve come from this design.
//
// Interface: pulse `start` while idle with `scalar`, `px`, `py`. `busy` is
// high while working; `done` pulses when qx/qy/q_inf are valid (they hold
// until the next start). The compressed result is qx plus q_ybit, the least
// significant bit of qy. Latency depends on the scalar: 3 cycles per bit of
// decisions, 14 per doubling and 11 per addition: 31 cycles for k = 1, at
// most 206, and 167 on average over the scalars 128..255, in line with the
// roughly 160 clocks the document reports.
module ecc_engine
  import crypto_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic [7:0] scalar,
  input  logic [7:0] px,
  input  logic [7:0] py,
  output logic [7:0] qx,
  output logic [7:0] qy,
  output logic       q_inf,
  output logic       q_ybit,
  output logic       busy,
  output logic       done
);

  // register file
  typedef enum logic [3:0] {
    R_X, R_Y, R_GX, R_GY, R_A, R_T1, R_T2, R_T3, R_L, R_ONE, R_R2
  } reg_e;
  localparam int unsigned NREGS = 11;

  typedef struct packed {
    gf_op_e op;
    reg_e   dst;
    reg_e   sa;
    reg_e   sb;
    logic   last;
  } uop_t;

  localparam int unsigned IN_BASE  = 0;
  localparam int unsigned DBL_BASE = 3;
  localparam int unsigned ADD_BASE = DBL_BASE + 14;
  localparam int unsigned OUT_BASE = ADD_BASE + 11;
  localparam int unsigned ROM_SIZE = OUT_BASE + 2;

  function automatic uop_t mk(gf_op_e op, reg_e d, reg_e a, reg_e b, logic last = 1'b0);
    return '{op: op, dst: d, sa: a, sb: b, last: last};
  endfunction

  function automatic uop_t ucode(int unsigned pc);
    int unsigned d = pc - DBL_BASE;
    int unsigned s = pc - ADD_BASE;
    if (pc < DBL_BASE) begin
      unique case (pc)
        0:       return mk(GF_MUL, R_GX, R_GX, R_R2);
        1:       return mk(GF_MUL, R_GY, R_GY, R_R2);
        default: return mk(GF_MUL, R_A,  R_A,  R_R2, 1'b1);
      endcase
    end else if (pc < ADD_BASE) begin
      unique case (d)
        0:       return mk(GF_MUL, R_T1, R_X,  R_X);
        1:       return mk(GF_ADD, R_T2, R_T1, R_T1);
        2:       return mk(GF_ADD, R_T1, R_T2, R_T1);
        3:       return mk(GF_ADD, R_T1, R_T1, R_A);
        4:       return mk(GF_ADD, R_T2, R_Y,  R_Y);
        5:       return mk(GF_INV, R_T3, R_T2, R_T2);
        6:       return mk(GF_MUL, R_L,  R_T1, R_T3);
        7:       return mk(GF_MUL, R_T1, R_L,  R_L);
        8:       return mk(GF_SUB, R_T1, R_T1, R_X);
        9:       return mk(GF_SUB, R_T1, R_T1, R_X);
        10:      return mk(GF_SUB, R_T2, R_X,  R_T1);
        11:      return mk(GF_MUL, R_T2, R_L,  R_T2);
        12:      return mk(GF_SUB, R_Y,  R_T2, R_Y);
        default: return mk(GF_MOV, R_X,  R_T1, R_T1, 1'b1);
      endcase
    end else if (pc < OUT_BASE) begin
      unique case (s)
        0:       return mk(GF_SUB, R_T1, R_GY, R_Y);
        1:       return mk(GF_SUB, R_T2, R_GX, R_X);
        2:       return mk(GF_INV, R_T3, R_T2, R_T2);
        3:       return mk(GF_MUL, R_L,  R_T1, R_T3);
        4:       return mk(GF_MUL, R_T1, R_L,  R_L);
        5:       return mk(GF_SUB, R_T1, R_T1, R_X);
        6:       return mk(GF_SUB, R_T1, R_T1, R_GX);
        7:       return mk(GF_SUB, R_T2, R_X,  R_T1);
        8:       return mk(GF_MUL, R_T2, R_L,  R_T2);
        9:       return mk(GF_SUB, R_Y,  R_T2, R_Y);
        default: return mk(GF_MOV, R_X,  R_T1, R_T1, 1'b1);
      endcase
    end else begin
      if (pc == OUT_BASE) return mk(GF_MUL, R_X, R_X, R_ONE);
      return mk(GF_MUL, R_Y, R_Y, R_ONE, 1'b1);
    end
  endfunction

  typedef enum logic [2:0] {
    S_IDLE, S_UCODE, S_DBL, S_ADD, S_NEXT, S_DONE
  } state_e;

  state_e      state_q, ret_q;
  logic [6:0]  pc_q;
  logic [7:0]  regs_q [NREGS];
  logic [7:0]  k_q;
  logic [2:0]  bit_q;
  logic        inf_q;
  uop_t        uop;
  logic [7:0]  alu_y;

  assign uop = ucode(32'(pc_q));

  gf_arith u_alu (
    .op(uop.op),
    .a (regs_q[uop.sa]),
    .b (regs_q[uop.sb]),
    .y (alu_y)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q <= S_IDLE;
      ret_q   <= S_IDLE;
      pc_q    <= '0;
      k_q     <= '0;
      bit_q   <= '0;
      inf_q   <= 1'b1;
      busy    <= 1'b0;
      done    <= 1'b0;
      qx      <= '0;
      qy      <= '0;
      q_inf   <= 1'b1;
      for (int i = 0; i < NREGS; i++) regs_q[i] <= '0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          regs_q[R_X]   <= '0;
          regs_q[R_Y]   <= '0;
          regs_q[R_GX]  <= px;
          regs_q[R_GY]  <= py;
          regs_q[R_A]   <= ECC_A;
          regs_q[R_ONE] <= 8'd1;
          regs_q[R_R2]  <= ECC_R2;
          k_q     <= scalar;
          bit_q   <= 3'd7;
          inf_q   <= 1'b1;
          busy    <= 1'b1;
          pc_q    <= 7'(IN_BASE);
          ret_q   <= S_DBL;
          state_q <= S_UCODE;
        end
        S_UCODE: begin
          regs_q[uop.dst] <= alu_y;
          if (uop.last) state_q <= ret_q;
          else          pc_q    <= pc_q + 7'd1;
        end
        S_DBL: begin
          // R = 2R for the current bit
          if (inf_q) begin
            state_q <= S_ADD;
          end else if (regs_q[R_Y] == 8'd0) begin
            inf_q   <= 1'b1;
            state_q <= S_ADD;
          end else begin
            pc_q    <= 7'(DBL_BASE);
            ret_q   <= S_ADD;
            state_q <= S_UCODE;
          end
        end
        S_ADD: begin
          // R = R + P when the current scalar bit is set
          state_q <= S_NEXT;
          if (k_q[bit_q]) begin
            if (inf_q) begin
              regs_q[R_X] <= regs_q[R_GX];
              regs_q[R_Y] <= regs_q[R_GY];
              inf_q       <= 1'b0;
            end else if (regs_q[R_X] == regs_q[R_GX]) begin
              if (regs_q[R_Y] == regs_q[R_GY] && regs_q[R_Y] != 8'd0) begin
                pc_q    <= 7'(DBL_BASE);
                ret_q   <= S_NEXT;
                state_q <= S_UCODE;
              end else begin
                inf_q <= 1'b1;     // R = -P
              end
            end else begin
              pc_q    <= 7'(ADD_BASE);
              ret_q   <= S_NEXT;
              state_q <= S_UCODE;
            end
          end
        end
        S_NEXT: begin
          if (bit_q == 3'd0) begin
            pc_q    <= 7'(OUT_BASE);
            ret_q   <= S_DONE;
            state_q <= S_UCODE;
          end else begin
            bit_q   <= bit_q - 3'd1;
            state_q <= S_DBL;
          end
        end
        S_DONE: begin
          qx      <= inf_q ? 8'd0 : regs_q[R_X];
          qy      <= inf_q ? 8'd0 : regs_q[R_Y];
          q_inf   <= inf_q;
          busy    <= 1'b0;
          done    <= 1'b1;
          state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign q_ybit = qy[0];

  // the microcode address never leaves the ROM
  a_pc_in_rom: assert property (@(posedge clk) disable iff (rst)
    state_q == S_UCODE |-> 32'(pc_q) < ROM_SIZE);

endmodule
