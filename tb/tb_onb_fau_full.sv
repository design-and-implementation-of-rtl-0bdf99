// tb_onb_fau_full: the field arithmetic unit at its default size (m = 173,
// Type II optimal normal basis), unmodified. Runs inversion of 1 and of 0,
// a multiplication by 1, and two rounds of all six operations on random
// operands, checking results against the convolution reference and
// latencies (multiplication 174 clocks, inversion 1749 clocks).
module tb_onb_fau_full;
  import fau_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          start, busy, done, fin;
  fau_op_e       op;
  logic [172:0]  a, b, y, y2;
  int            checks, failures, nop [6], nign;

  onb_fau dut (.clk, .rst_n, .start, .op, .a, .b, .y, .y2, .busy, .done);

  fau_driver #(.M(173), .ONB_TYPE(2), .N_RAND(2)) drv (
    .clk, .rst_n, .start, .op, .a, .b, .y, .y2, .busy, .done,
    .checks, .failures, .n_op(nop), .n_ignored(nign), .finished(fin));

  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (fin);
    checks++;
    if (nop[int'(OP_INV)] == 0) begin
      failures++;
      $display("FAIL no inversion completed");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
