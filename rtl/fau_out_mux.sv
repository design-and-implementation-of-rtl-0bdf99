// fau_out_mux: the m AND gates and m XOR gates of the field arithmetic unit
// and its result multiplexer.
//
// AND and XOR (field addition) are taken straight from REG1 and REG2 once the
// operands are loaded. Square and square root leave A's result in REG1 (B's in
// REG2, brought out separately), multiplication leaves the product in REG3 and
// inversion leaves a^-1 in REG1. The gates follow the document's component
// list; which register each result is read from follows its algorithms, and
// the selection by the last operation is this design's choice.
//
// Interface: purely combinational.
module fau_out_mux
  import fau_pkg::*;
#(
  parameter int unsigned M = 173
) (
  input  fau_op_e      op,
  input  logic [M-1:0] r1,
  input  logic [M-1:0] r2,
  input  logic [M-1:0] r3,
  output logic [M-1:0] y
);

  logic [M-1:0] y_and, y_xor;

  assign y_and = r1 & r2;
  assign y_xor = r1 ^ r2;

  always_comb begin
    unique case (op)
      OP_AND:  y = y_and;
      OP_XOR:  y = y_xor;
      OP_MUL:  y = r3;
      default: y = r1;  // OP_SQR, OP_SQRT, OP_INV
    endcase
  end

endmodule
