// tb_fau_out_mux: random register contents for every operation code; the
// output must be A AND B, A XOR B, REG3 for multiplication and REG1 for
// squaring, square root and inversion.
module tb_fau_out_mux;
  import fau_pkg::*;
  import onb_ref_pkg::*;

  int checks = 0, failures = 0;
  fau_op_e      op;
  logic [172:0] r1, r2, r3, y, exp_y;

  fau_out_mux dut (.op, .r1, .r2, .r3, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 600; n++) begin
      op = fau_op_e'(n % 6);
      r1 = 173'(ref_rand(173)); r2 = 173'(ref_rand(173)); r3 = 173'(ref_rand(173));
      case (op)
        OP_AND:  for (int i = 0; i < 173; i++) exp_y[i] = r1[i] && r2[i];
        OP_XOR:  for (int i = 0; i < 173; i++) exp_y[i] = r1[i] != r2[i];
        OP_MUL:  exp_y = r3;
        default: exp_y = r1;
      endcase
      #1;
      checks++;
      if (y !== exp_y) begin
        failures++;
        if (failures < 10) $display("FAIL op=%s", op.name());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
