// tb_onb_fau: end-to-end test of the field arithmetic unit at four field
// sizes: m = 5 and m = 9 (Type II), m = 10 (Type I) and m = 173 (Type II,
// the default size). Each runs every operation on random and special
// operands through fau_driver and checks results and latencies.
// It also counts, across all instances, how often each mechanism of the
// unit occurred, and fails if one never did: each of the six operations,
// Itoh-Tsujii steps with an odd r (REG2 <- REG3 squared, REG1 <- A and a
// second multiplication), steps with an even r, a barrel rotation by more
// than one bit, and a start ignored while busy.
module tb_onb_fau;
  import fau_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks, failures;

  `define FAU_INST(NAME, MM, TT, NR) \
    logic          NAME``_start, NAME``_busy, NAME``_done, NAME``_fin; \
    fau_op_e       NAME``_op; \
    logic [MM-1:0] NAME``_a, NAME``_b, NAME``_y, NAME``_y2; \
    int            NAME``_checks, NAME``_fail, NAME``_nop [6], NAME``_nign; \
    onb_fau #(.M(MM), .ONB_TYPE(TT)) NAME ( \
      .clk, .rst_n, .start(NAME``_start), .op(NAME``_op), .a(NAME``_a), .b(NAME``_b), \
      .y(NAME``_y), .y2(NAME``_y2), .busy(NAME``_busy), .done(NAME``_done)); \
    fau_driver #(.M(MM), .ONB_TYPE(TT), .N_RAND(NR)) NAME``_drv ( \
      .clk, .rst_n, .start(NAME``_start), .op(NAME``_op), .a(NAME``_a), .b(NAME``_b), \
      .y(NAME``_y), .y2(NAME``_y2), .busy(NAME``_busy), .done(NAME``_done), \
      .checks(NAME``_checks), .failures(NAME``_fail), .n_op(NAME``_nop), \
      .n_ignored(NAME``_nign), .finished(NAME``_fin));

  `FAU_INST(u5,   5,   2, 40)
  `FAU_INST(u9,   9,   2, 30)
  `FAU_INST(u10,  10,  1, 30)
  `FAU_INST(u173, 173, 2, 2)

  // Mechanism counters, from the controllers' control words.
  int n_odd = 0, n_even = 0, n_wide_rot = 0;

  always @(posedge clk) begin
    if (u5.ctl.r2_mode == RM_LOAD && u5.ctl.r2_sel == R2_FROM_R3SQ) n_odd++;
    if (u9.ctl.r2_mode == RM_LOAD && u9.ctl.r2_sel == R2_FROM_R3SQ) n_odd++;
    if (u10.ctl.r2_mode == RM_LOAD && u10.ctl.r2_sel == R2_FROM_R3SQ) n_odd++;
    if (u173.ctl.r2_mode == RM_LOAD && u173.ctl.r2_sel == R2_FROM_R3SQ) n_odd++;
    if (u173.ctl.r1_mode == RM_LOAD && u173.ctl.r1_sel == R1_FROM_R3 &&
        u173.u_ctrl.r[0] == 1'b0) n_even++;
    if (u173.ctl.r2_mode == RM_LOAD && u173.ctl.r2_sel == R2_FROM_BARREL &&
        u173.ctl.rot_amt > 1) n_wide_rot++;
  end

  task automatic mech(input string nm, input int n);
    checks++;
    $display("mechanism %-28s %0d", nm, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism %s never occurred", nm);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", u5_checks + u9_checks + u10_checks + u173_checks,
             u5_fail + u9_fail + u10_fail + u173_fail + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (u5_fin && u9_fin && u10_fin && u173_fin);
    checks   = u5_checks + u9_checks + u10_checks + u173_checks;
    failures = u5_fail + u9_fail + u10_fail + u173_fail;
    for (int o = 0; o < 6; o++)
      mech($sformatf("operation %s", fau_op_e'(o)),
           u5_nop[o] + u9_nop[o] + u10_nop[o] + u173_nop[o]);
    mech("inversion odd step", n_odd);
    mech("inversion even step", n_even);
    mech("barrel rotation > 1 bit", n_wide_rot);
    mech("start ignored while busy", u5_nign + u9_nign + u10_nign + u173_nign);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
