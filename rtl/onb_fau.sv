// onb_fau: compact optimal-normal-basis field arithmetic unit for GF(2^m).
//
// One datapath of three m-bit cyclic shift registers serves every operation:
// AND, XOR (addition), squaring and square root of both operands at once,
// bit-serial Massey-Omura multiplication and Itoh-Tsujii inversion. The
// multiplier's AND plane / XOR tree reads REG1 and REG2 and feeds REG3 one
// product bit per clock; inversion reuses the same registers and multiplier,
// with a barrel shifter raising REG1 to a power 2^k in one clock on its way
// into REG2. Sharing the registers between multiplier and inverter is the
// document's idea; the port list and handshake are this design's.
//
// Interface: drive op and a/b and pulse start while busy is low. done pulses
// for one cycle when y (and, for squaring and square root, y2 = B^2 or
// sqrt(B)) are valid; they stay valid until the next start. During an
// inversion a must stay unchanged, because the algorithm multiplies by a
// again in its odd steps. Latencies (start edge to done): AND/XOR 1,
// SQR/SQRT 2, MUL m+1, INV as given in fau_controller (1749 for m = 173).
// Bit i of every vector is the coefficient of beta^(2^i).
module onb_fau
  import fau_pkg::*;
#(
  parameter int unsigned M        = 173,
  parameter int unsigned ONB_TYPE = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  fau_op_e      op,
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic [M-1:0] y,
  output logic [M-1:0] y2,
  output logic         busy,
  output logic         done
);

  localparam int unsigned KW = (M > 1) ? $clog2(M) : 1;

  fau_ctl_t     ctl;
  fau_op_e      op_q;
  logic [M-1:0] r1, r2, r3;
  logic [M-1:0] r1_d, r2_d, barrel;
  logic         c0;

  fau_controller #(.M(M)) u_ctrl (
    .clk, .rst_n, .start, .op, .ctl, .op_q, .busy, .done
  );

  // REG1 input multiplexer.
  assign r1_d = (ctl.r1_sel == R1_FROM_R3) ? r3 : a;

  // Barrel shifter: REG1 raised to 2^floor(r/2).
  barrel_rotator #(.M(M)) u_barrel (
    .x(r1), .k(KW'(ctl.rot_amt)), .y(barrel)
  );

  // REG2 input multiplexer.
  always_comb begin
    unique case (ctl.r2_sel)
      R2_FROM_BARREL: r2_d = barrel;
      R2_FROM_R3SQ:   r2_d = {r3[M-2:0], r3[M-1]};
      default:        r2_d = b;
    endcase
  end

  cyclic_shift_register #(.M(M)) u_reg1 (
    .clk, .rst_n, .mode(ctl.r1_mode), .d(r1_d), .sin(1'b0), .q(r1)
  );
  cyclic_shift_register #(.M(M)) u_reg2 (
    .clk, .rst_n, .mode(ctl.r2_mode), .d(r2_d), .sin(1'b0), .q(r2)
  );
  cyclic_shift_register #(.M(M)) u_reg3 (
    .clk, .rst_n, .mode(ctl.r3_mode), .d(r1), .sin(c0), .q(r3)
  );

  // Massey-Omura AND plane and XOR tree.
  mo_and_xor #(.M(M), .ONB_TYPE(ONB_TYPE)) u_mo (
    .a(r1), .b(r2), .c0
  );

  fau_out_mux #(.M(M)) u_out (
    .op(op_q), .r1, .r2, .r3, .y
  );

  assign y2 = r2;

  // The inversion reads a again in its odd steps: a must be held.
  a_a_stable: assert property (@(posedge clk) disable iff (!rst_n)
                               busy && op_q == OP_INV |-> $stable(a));

endmodule
