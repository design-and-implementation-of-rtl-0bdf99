// tb_onb_fau_workloads: the field arithmetic unit at the other field sizes
// it is meant for, m = 233, 350 and 515 (all Type II optimal normal bases),
// one round of all six operations plus the special operands on each, results
// and latencies checked against the convolution reference.
module tb_onb_fau_workloads;
  import fau_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  `define FAU_INST(NAME, MM) \
    logic          NAME``_start, NAME``_busy, NAME``_done, NAME``_fin; \
    fau_op_e       NAME``_op; \
    logic [MM-1:0] NAME``_a, NAME``_b, NAME``_y, NAME``_y2; \
    int            NAME``_checks, NAME``_fail, NAME``_nop [6], NAME``_nign; \
    onb_fau #(.M(MM), .ONB_TYPE(2)) NAME ( \
      .clk, .rst_n, .start(NAME``_start), .op(NAME``_op), .a(NAME``_a), .b(NAME``_b), \
      .y(NAME``_y), .y2(NAME``_y2), .busy(NAME``_busy), .done(NAME``_done)); \
    fau_driver #(.M(MM), .ONB_TYPE(2), .N_RAND(1)) NAME``_drv ( \
      .clk, .rst_n, .start(NAME``_start), .op(NAME``_op), .a(NAME``_a), .b(NAME``_b), \
      .y(NAME``_y), .y2(NAME``_y2), .busy(NAME``_busy), .done(NAME``_done), \
      .checks(NAME``_checks), .failures(NAME``_fail), .n_op(NAME``_nop), \
      .n_ignored(NAME``_nign), .finished(NAME``_fin));

  `FAU_INST(u233, 233)
  `FAU_INST(u350, 350)
  `FAU_INST(u515, 515)

  initial begin
    repeat (200000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", u233_checks + u350_checks + u515_checks,
             u233_fail + u350_fail + u515_fail + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (u233_fin && u350_fin && u515_fin);
    $display("inversions completed: m=233 %0d, m=350 %0d, m=515 %0d",
             u233_nop[int'(OP_INV)], u350_nop[int'(OP_INV)], u515_nop[int'(OP_INV)]);
    $display("TB_RESULT checks=%0d failures=%0d", u233_checks + u350_checks + u515_checks,
             u233_fail + u350_fail + u515_fail);
    $finish;
  end
endmodule
