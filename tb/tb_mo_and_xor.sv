// tb_mo_and_xor: checks the Massey-Omura AND plane / XOR tree against the
// convolution reference for Type II fields m = 5, 173 and a Type I field
// m = 4 and m = 10. Every product bit k is checked by feeding the operands
// rotated right by k (c_k = c0 of the rotated operands).
module tb_mo_and_xor;
  import onb_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [4:0]   a5, b5;   logic c5;
  logic [3:0]   a4, b4;   logic c4;
  logic [9:0]   a10, b10; logic c10;
  logic [172:0] a173, b173; logic c173;

  mo_and_xor #(.M(5),  .ONB_TYPE(2)) u5   (.a(a5),   .b(b5),   .c0(c5));
  mo_and_xor #(.M(4),  .ONB_TYPE(1)) u4   (.a(a4),   .b(b4),   .c0(c4));
  mo_and_xor #(.M(10), .ONB_TYPE(1)) u10  (.a(a10),  .b(b10),  .c0(c10));
  mo_and_xor                         u173 (.a(a173), .b(b173), .c0(c173));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string nm, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0b exp %0b", nm, got, exp);
    end
  endtask

  initial begin
    elem_t ea, eb, ec;
    // m = 5, exhaustive
    for (int x = 0; x < 32; x++)
      for (int z = 0; z < 32; z++) begin
        ea = elem_t'(x); eb = elem_t'(z);
        ec = ref_mul(ea, eb, 5, 2);
        for (int k = 0; k < 5; k++) begin
          a5 = 5'(ref_rotl(ea, 5, 5 - k)); b5 = 5'(ref_rotl(eb, 5, 5 - k));
          #1 check("m5", c5, ec[k]);
        end
      end
    // m = 4, Type I, exhaustive
    for (int x = 0; x < 16; x++)
      for (int z = 0; z < 16; z++) begin
        ea = elem_t'(x); eb = elem_t'(z);
        ec = ref_mul(ea, eb, 4, 1);
        for (int k = 0; k < 4; k++) begin
          a4 = 4'(ref_rotl(ea, 4, 4 - k)); b4 = 4'(ref_rotl(eb, 4, 4 - k));
          #1 check("m4", c4, ec[k]);
        end
      end
    // m = 10, Type I, random
    for (int n = 0; n < 50; n++) begin
      ea = ref_rand(10); eb = ref_rand(10);
      ec = ref_mul(ea, eb, 10, 1);
      for (int k = 0; k < 10; k++) begin
        a10 = 10'(ref_rotl(ea, 10, 10 - k)); b10 = 10'(ref_rotl(eb, 10, 10 - k));
        #1 check("m10", c10, ec[k]);
      end
    end
    // m = 173, Type II, random
    for (int n = 0; n < 4; n++) begin
      ea = ref_rand(173); eb = ref_rand(173);
      ec = ref_mul(ea, eb, 173, 2);
      for (int k = 0; k < 173; k++) begin
        a173 = 173'(ref_rotl(ea, 173, 173 - k)); b173 = 173'(ref_rotl(eb, 173, 173 - k));
        #1 check("m173", c173, ec[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
