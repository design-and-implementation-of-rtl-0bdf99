// tb_barrel_rotator: every rotation amount 0..m-1 on random elements, for
// m = 173 and m = 5, against a bit-by-bit rotation.
module tb_barrel_rotator;
  import onb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [172:0] x, y;
  logic [7:0]   k;
  logic [4:0]   x5, y5;
  logic [2:0]   k5;

  barrel_rotator          dut  (.x, .k, .y);
  barrel_rotator #(.M(5)) dut5 (.x(x5), .k(k5), .y(y5));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4; n++)
      for (int kk = 0; kk < 173; kk++) begin
        x = 173'(ref_rand(173)); k = 8'(kk);
        #1;
        checks++;
        if (y !== 173'(ref_rotl(elem_t'(x), 173, kk))) begin
          failures++;
          if (failures < 10) $display("FAIL k=%0d", kk);
        end
      end
    for (int v = 0; v < 32; v++)
      for (int kk = 0; kk < 5; kk++) begin
        x5 = 5'(v); k5 = 3'(kk);
        #1;
        checks++;
        if (y5 !== 5'(ref_rotl(elem_t'(x5), 5, kk))) begin
          failures++;
          if (failures < 10) $display("FAIL m5 v=%0d k=%0d", v, kk);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
