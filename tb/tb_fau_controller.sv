// tb_fau_controller: runs every operation through the controller of a
// 173-bit unit and checks the control sequence it issues, without a datapath:
//   - latency from start to done (AND/XOR 1, SQR/SQRT 2, MUL m+1, INV 1749),
//   - the register modes of the one-cycle operations,
//   - m serial product cycles per multiplication,
//   - for inversion: the barrel rotation amounts floor(((m-1) >> s) / 2) for
//     s = 6..0, the number of multiplications (7 + 3 = 10), the odd-step
//     reload of REG1 from A and the final squaring of REG1,
//   - that start is ignored while busy, and that done is a single pulse.
module tb_fau_controller;
  import fau_pkg::*;

  localparam int M = 173;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic     start;
  fau_op_e  op, op_q;
  fau_ctl_t ctl;
  logic     busy, done;

  fau_controller dut (.clk, .rst_n, .start, .op, .ctl, .op_q, .busy, .done);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string nm, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", nm, got, exp);
    end
  endtask

  // Observed during one operation.
  int cycles, sin_cycles, mults, run, barrel_loads, sq_loads, r1_from_a, copies;
  int fin_rotl, rotl1, rotr1;
  int amts [$];

  task automatic run_op(input fau_op_e o);
    cycles = 0; sin_cycles = 0; mults = 0; run = 0; barrel_loads = 0;
    sq_loads = 0; r1_from_a = 0; copies = 0; fin_rotl = 0; rotl1 = 0; rotr1 = 0;
    amts.delete();
    @(negedge clk);
    op = o; start = 1;
    @(negedge clk);
    start = 0;
    op = OP_AND;  // must not matter once started
    while (!done) begin
      cycles++;
      if (ctl.r3_mode == RM_ROTL_SIN) begin
        sin_cycles++; run++;
      end else begin
        if (run > 0) begin
          check("product bits per multiplication", run, M);
          mults++;
        end
        run = 0;
      end
      if (ctl.r2_mode == RM_LOAD && ctl.r2_sel == R2_FROM_BARREL) begin
        barrel_loads++; amts.push_back(int'(ctl.rot_amt));
      end
      if (ctl.r2_mode == RM_LOAD && ctl.r2_sel == R2_FROM_R3SQ) begin
        sq_loads++;
        if (ctl.r1_mode == RM_LOAD && ctl.r1_sel == R1_FROM_A) r1_from_a++;
      end
      if (ctl.r1_mode == RM_LOAD && ctl.r1_sel == R1_FROM_R3) copies++;
      if (ctl.r1_mode == RM_ROTL && ctl.r2_mode == RM_HOLD) fin_rotl++;
      if (ctl.r1_mode == RM_ROTL && ctl.r2_mode == RM_ROTL && ctl.r3_mode == RM_HOLD) rotl1++;
      if (ctl.r1_mode == RM_ROTR && ctl.r2_mode == RM_ROTR) rotr1++;
      // a start while busy must be ignored
      if (cycles == 3) start = 1;
      @(negedge clk);
      start = 0;
      if (cycles > 5000) break;
    end
    cycles++;  // the edge that raised done
    check("op_q latched", int'(op_q), int'(o));
    @(negedge clk);
    check("done is one cycle", int'(done), 0);
    check("idle after done", int'(busy), 0);
  endtask

  initial begin
    int exp_amts [7] = '{1, 2, 5, 10, 21, 43, 86};
    start = 0; op = OP_AND;
    repeat (2) @(posedge clk);
    rst_n = 1;

    run_op(OP_AND);  check("AND latency", cycles, 1);
    run_op(OP_XOR);  check("XOR latency", cycles, 1);
    run_op(OP_SQR);  check("SQR latency", cycles, 2);  check("SQR rotates left", rotl1, 1);
    run_op(OP_SQRT); check("SQRT latency", cycles, 2); check("SQRT rotates right", rotr1, 1);
    run_op(OP_MUL);  check("MUL latency", cycles, M + 1);
    check("MUL serial cycles", sin_cycles, M);
    run_op(OP_INV);
    check("INV latency", cycles, 2 + 7 * (M + 2) + 3 * (M + 1));
    check("INV multiplications", mults, 10);
    check("INV barrel loads", barrel_loads, 7);
    for (int i = 0; i < 7 && i < amts.size(); i++) check("INV rotation amount", amts[i], exp_amts[i]);
    check("INV odd steps", sq_loads, 3);
    check("INV odd steps reload A", r1_from_a, 3);
    check("INV copies", copies, 7);
    check("INV final square", fin_rotl, 1);
    run_op(OP_MUL);  check("MUL after INV latency", cycles, M + 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
