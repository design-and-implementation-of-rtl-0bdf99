// cyclic_shift_register: one of the three m-bit registers (REG1, REG2, REG3)
// that the field arithmetic unit shares between multiplication, inversion and
// the one-cycle operations.
//
// In a normal basis a left rotation by one bit is a squaring and a right
// rotation is a square root, so the register itself performs those
// operations. RM_ROTL_SIN is the product register's step of the bit-serial
// Massey-Omura multiplier: the new product bit is written into bit 0 and the
// whole register rotates left in the same clock, so after m steps every bit
// sits at its own position. That the registers hold, load and rotate follows
// the document; merging the bit write and the rotation into one clock is this
// design's choice.
//
// Interface: mode selects the action at the next rising clock edge, d is the
// parallel load value, sin the serial bit. q is the registered value.
// rst_n clears the register asynchronously.
module cyclic_shift_register
  import fau_pkg::*;
#(
  parameter int unsigned M = 173
) (
  input  logic           clk,
  input  logic           rst_n,
  input  reg_mode_e      mode,
  input  logic [M-1:0]   d,
  input  logic           sin,
  output logic [M-1:0]   q
);

  logic [M-1:0] with_sin;

  // Bit 0 replaced by the serial input (only used by RM_ROTL_SIN).
  always_comb begin
    with_sin    = q;
    with_sin[0] = sin;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0;
    end else begin
      unique case (mode)
        RM_HOLD:     q <= q;
        RM_LOAD:     q <= d;
        RM_ROTL:     q <= {q[M-2:0], q[M-1]};
        RM_ROTR:     q <= {q[0], q[M-1:1]};
        RM_ROTL_SIN: q <= {with_sin[M-2:0], with_sin[M-1]};
        default:     q <= q;
      endcase
    end
  end

endmodule
