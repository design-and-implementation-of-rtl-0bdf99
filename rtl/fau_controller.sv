// fau_controller: the inner controller of the field arithmetic unit. It
// sequences the three shared cyclic shift registers through every operation.
//
//   AND / XOR   REG1 <- A, REG2 <- B; the result is read from the AND or XOR
//               gates on the next cycle.
//   SQR / SQRT  REG1 <- A, REG2 <- B, then both rotate left (square) or right
//               (square root) once, giving two results at once.
//   MUL         REG1 <- A, REG2 <- B, then m clocks of the Massey-Omura loop:
//               REG3 takes one product bit into bit 0 and all three rotate
//               left. REG1 and REG2 are back to A and B at the end.
//   INV         Itoh-Tsujii: with L = floor(log2(m-1)), p = a^(2^r - 1)
//               grows from r = 1 to r = m-1 by one doubling step per bit of
//               m-1 below its leading one, for s = L-1 down to 0:
//                 r = (m-1) >> s
//                 Q:    REG2 <- REG1 rotated left by floor(r/2)
//                 M1:   REG3 <- REG1 * REG2                  (m clocks)
//                 if r is odd:
//                   SQ: REG2 <- REG3 rotated left by 1, REG1 <- A
//                   M2: REG3 <- REG2 * REG1                  (m clocks)
//                 COPY: REG1 <- REG3
//               and finally REG1 is rotated left once: REG1 = a^(2^m - 2).
//
// The operation list and the register usage follow the document. Where the
// document's inversion listing multiplies by REG1 in the odd step, this
// design multiplies by the input a (reloaded from port A), which is what
// the underlying Itoh-Tsujii algorithm requires; A must therefore be held
// stable while an inversion runs. The start/busy/done handshake, the state
// encoding and the single-clock barrel rotation are this design's choices.
//
// Timing (clock edges from the one that samples start to the one after
// which done is high): AND/XOR 1, SQR/SQRT 2, MUL m+1, INV
// 2 + L*(m+2) + (number of ones of m-1 below its leading one)*(m+1).
// done is a one-cycle pulse; the result stays in the registers until the
// next start. start is ignored while busy.
module fau_controller
  import fau_pkg::*;
#(
  parameter int unsigned M = 173
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  input  fau_op_e  op,
  output fau_ctl_t ctl,
  output fau_op_e  op_q,
  output logic     busy,
  output logic     done
);

  // floor(log2(m-1)): number of Itoh-Tsujii iterations.
  function automatic int unsigned flog2(input int unsigned v);
    int unsigned n;
    n = 0;
    while (v > 1) begin
      v = v >> 1;
      n++;
    end
    return n;
  endfunction

  localparam int unsigned L  = flog2(M - 1);
  localparam int unsigned BW = (M > 1) ? $clog2(M) : 1;  // bit counter
  localparam int unsigned SW = (L > 1) ? $clog2(L) : 1;  // iteration counter
  localparam logic [31:0] MM1 = 32'(M - 1);

  typedef enum logic [3:0] {
    S_IDLE, S_ROT, S_MUL, S_INV_Q, S_INV_M1, S_INV_SQ, S_INV_M2,
    S_INV_COPY, S_INV_FIN, S_DONE
  } state_e;

  state_e state, state_nx;

  // Counters.
  logic          bit_load, bit_dec, bit_zero;
  logic [BW-1:0] bit_cnt;
  logic          s_load, s_dec, s_zero;
  logic [SW-1:0] s_cnt;

  down_counter #(.W(BW)) u_bit_cnt (
    .clk, .rst_n, .load(bit_load), .init(BW'(M - 1)), .dec(bit_dec),
    .count(bit_cnt), .zero(bit_zero)
  );

  down_counter #(.W(SW)) u_iter_cnt (
    .clk, .rst_n, .load(s_load), .init(SW'((L > 0) ? L - 1 : 0)), .dec(s_dec),
    .count(s_cnt), .zero(s_zero)
  );

  // r = (m-1) >> s
  logic [31:0] r;
  assign r = MM1 >> s_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      op_q  <= OP_AND;
    end else begin
      state <= state_nx;
      if (state == S_IDLE && start) op_q <= op;
    end
  end

  always_comb begin
    state_nx    = state;
    ctl         = '0;
    ctl.r1_mode = RM_HOLD;
    ctl.r1_sel  = R1_FROM_A;
    ctl.r2_mode = RM_HOLD;
    ctl.r2_sel  = R2_FROM_B;
    ctl.r3_mode = RM_HOLD;
    ctl.rot_amt = ROT_W'(r >> 1);
    bit_load    = 1'b0;
    bit_dec     = 1'b0;
    s_load      = 1'b0;
    s_dec       = 1'b0;

    unique case (state)
      S_IDLE: begin
        if (start) begin
          ctl.r1_mode = RM_LOAD;
          ctl.r2_mode = RM_LOAD;
          unique case (op)
            OP_AND, OP_XOR: state_nx = S_DONE;
            OP_SQR, OP_SQRT: state_nx = S_ROT;
            OP_MUL: begin
              bit_load = 1'b1;
              state_nx = S_MUL;
            end
            OP_INV: begin
              s_load   = 1'b1;
              state_nx = (L == 0) ? S_INV_FIN : S_INV_Q;
            end
            default: state_nx = S_IDLE;
          endcase
        end
      end
      S_ROT: begin
        ctl.r1_mode = (op_q == OP_SQR) ? RM_ROTL : RM_ROTR;
        ctl.r2_mode = (op_q == OP_SQR) ? RM_ROTL : RM_ROTR;
        state_nx    = S_DONE;
      end
      S_MUL, S_INV_M1, S_INV_M2: begin
        ctl.r1_mode = RM_ROTL;
        ctl.r2_mode = RM_ROTL;
        ctl.r3_mode = RM_ROTL_SIN;
        bit_dec     = 1'b1;
        if (bit_zero) begin
          unique case (state)
            S_MUL:    state_nx = S_DONE;
            S_INV_M1: state_nx = r[0] ? S_INV_SQ : S_INV_COPY;
            default:  state_nx = S_INV_COPY;
          endcase
        end
      end
      S_INV_Q: begin
        ctl.r2_mode = RM_LOAD;
        ctl.r2_sel  = R2_FROM_BARREL;
        bit_load    = 1'b1;
        state_nx    = S_INV_M1;
      end
      S_INV_SQ: begin
        ctl.r2_mode = RM_LOAD;
        ctl.r2_sel  = R2_FROM_R3SQ;
        ctl.r1_mode = RM_LOAD;
        ctl.r1_sel  = R1_FROM_A;
        bit_load    = 1'b1;
        state_nx    = S_INV_M2;
      end
      S_INV_COPY: begin
        ctl.r1_mode = RM_LOAD;
        ctl.r1_sel  = R1_FROM_R3;
        if (s_zero) state_nx = S_INV_FIN;
        else begin
          s_dec    = 1'b1;
          state_nx = S_INV_Q;
        end
      end
      S_INV_FIN: begin
        ctl.r1_mode = RM_ROTL;
        state_nx    = S_DONE;
      end
      S_DONE:  state_nx = S_IDLE;
      default: state_nx = S_IDLE;
    endcase
  end

  assign busy = (state != S_IDLE);
  assign done = (state == S_DONE);

  // done lasts exactly one cycle.
  a_done_pulse: assert property (@(posedge clk) disable iff (!rst_n) done |=> !done);

endmodule
