// fau_pkg: types shared by the optimal-normal-basis field arithmetic unit.
//
// The unit works on elements of GF(2^m) written in a normal basis
// (beta, beta^2, beta^4, ..., beta^(2^(m-1))). Bit i of an m-bit vector is the
// coefficient of beta^(2^i), so squaring is a left rotation and the square
// root a right rotation. This package holds the operation codes seen at the
// unit's port, the modes of the three cyclic shift registers, and the control
// word that the controller hands to the datapath. The operation set follows
// the document; the encodings are this design's own.
package fau_pkg;

  // Operations of the arithmetic unit.
  typedef enum logic [2:0] {
    OP_AND  = 3'd0,  // A AND B
    OP_XOR  = 3'd1,  // A XOR B (field addition / subtraction)
    OP_SQR  = 3'd2,  // A^2 and B^2 concurrently
    OP_SQRT = 3'd3,  // sqrt(A) and sqrt(B) concurrently
    OP_MUL  = 3'd4,  // A * B, bit-serial Massey-Omura
    OP_INV  = 3'd5   // A^-1, Itoh-Tsujii
  } fau_op_e;

  // What a cyclic shift register does on the next clock edge.
  typedef enum logic [2:0] {
    RM_HOLD     = 3'd0,  // keep value
    RM_LOAD     = 3'd1,  // parallel load
    RM_ROTL     = 3'd2,  // rotate left by one: square
    RM_ROTR     = 3'd3,  // rotate right by one: square root
    RM_ROTL_SIN = 3'd4   // write serial bit into bit 0, then rotate left
  } reg_mode_e;

  // Load source of REG1.
  typedef enum logic [0:0] {
    R1_FROM_A   = 1'b0,
    R1_FROM_R3  = 1'b1
  } r1_sel_e;

  // Load source of REG2.
  typedef enum logic [1:0] {
    R2_FROM_B      = 2'd0,
    R2_FROM_BARREL = 2'd1,  // REG1 rotated left by the barrel shifter
    R2_FROM_R3SQ   = 2'd2   // REG3 rotated left by one (squared)
  } r2_sel_e;

  // Rotation amounts are kept in a fixed-width field wide enough for the
  // largest field the unit is meant for (m < 2^12).
  localparam int unsigned ROT_W = 12;

  // Control word from the controller to the datapath.
  typedef struct packed {
    reg_mode_e         r1_mode;
    r1_sel_e           r1_sel;
    reg_mode_e         r2_mode;
    r2_sel_e           r2_sel;
    reg_mode_e         r3_mode;
    logic [ROT_W-1:0]  rot_amt;  // barrel shifter amount, floor(r/2)
  } fau_ctl_t;

endpackage
