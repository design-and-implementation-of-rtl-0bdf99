// tb_cyclic_shift_register: drives random modes, load values and serial bits
// into a 173-bit and a 7-bit register and compares each clock with a model
// written from the mode definitions (rotate left = squaring, rotate right =
// square root, serial bit into bit 0 then rotate left).
module tb_cyclic_shift_register;
  import fau_pkg::*;
  import onb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  reg_mode_e    mode;
  logic [172:0] d, q, model;
  logic         sin;
  logic [6:0]   d7, q7, model7;

  cyclic_shift_register           dut  (.clk, .rst_n, .mode, .d, .sin, .q);
  cyclic_shift_register #(.M(7))  dut7 (.clk, .rst_n, .mode, .d(d7), .sin, .q(q7));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [172:0] step(input logic [172:0] v, input reg_mode_e md,
                                        input logic [172:0] dd, input logic s, input int m);
    logic [172:0] r;
    r = v;
    unique case (md)
      RM_LOAD:     r = dd;
      RM_ROTL:     r = 173'(ref_rotl(elem_t'(v), m, 1));
      RM_ROTR:     r = 173'(ref_rotl(elem_t'(v), m, m - 1));
      RM_ROTL_SIN: begin
        r = v; r[0] = s;
        r = 173'(ref_rotl(elem_t'(r), m, 1));
      end
      default:     r = v;
    endcase
    return r;
  endfunction

  initial begin
    mode = RM_HOLD; d = '0; d7 = '0; sin = 0;
    repeat (2) @(posedge clk);
    #1;
    checks++; if (q !== '0 || q7 !== '0) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    model = '0; model7 = '0;
    for (int n = 0; n < 2000; n++) begin
      mode = reg_mode_e'($urandom_range(0, 4));
      d    = 173'(ref_rand(173));
      d7   = 7'($urandom);
      sin  = 1'($urandom);
      model  = step(model, mode, d, sin, 173);
      model7 = 7'(step(173'(model7), mode, 173'(d7), sin, 7));
      @(posedge clk); #1;
      checks++;
      if (q !== model || q7 !== model7) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d mode=%s", n, mode.name());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
