// fau_driver: testbench driver and checker for one onb_fau instance of
// field size M. It runs every operation on random operands (plus the
// special operands 0 and 1), compares y / y2 with the convolution reference
// of onb_ref_pkg, and checks the latency of each operation. During each run
// it pulses start once more while the unit is busy, with a different
// operation and a changed B, which must be ignored.
//
// Ports: it drives start/op/a/b of the unit and watches y/y2/busy/done;
// checks and failures are running totals, n_op counts completed operations
// per code, finished rises when all runs are done.
module fau_driver
  import fau_pkg::*;
  import onb_ref_pkg::*;
#(
  parameter int M        = 5,
  parameter int ONB_TYPE = 2,
  parameter int N_RAND   = 20
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic         start,
  output fau_op_e      op,
  output logic [M-1:0] a,
  output logic [M-1:0] b,
  input  logic [M-1:0] y,
  input  logic [M-1:0] y2,
  input  logic         busy,
  input  logic         done,
  output int           checks,
  output int           failures,
  output int           n_op [6],
  output int           n_ignored,
  output logic         finished
);

  function automatic int flog2(input int v);
    int n = 0;
    while (v > 1) begin v = v >> 1; n++; end
    return n;
  endfunction

  function automatic int ones(input int v);
    int n = 0;
    while (v > 0) begin n += v & 1; v = v >> 1; end
    return n;
  endfunction

  localparam int L = flog2(M - 1);

  function automatic int latency(input fau_op_e o);
    case (o)
      OP_AND, OP_XOR:  return 1;
      OP_SQR, OP_SQRT: return 2;
      OP_MUL:          return M + 1;
      default:         return 2 + L * (M + 2) + (ones(M - 1) - 1) * (M + 1);
    endcase
  endfunction

  task automatic check(input string nm, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL m=%0d %s", M, nm);
    end
  endtask

  task automatic run(input fau_op_e o, input elem_t ea, input elem_t eb);
    int cyc;
    elem_t ey, ey2;
    @(negedge clk);
    op = o; a = M'(ea); b = M'(eb); start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done && cyc < 10 * latency(OP_INV) + 10) begin
      if (cyc == 1 && busy) begin
        // must be ignored: different op, and B changes (A must stay)
        start = 1; op = (o == OP_MUL) ? OP_XOR : OP_MUL; b = ~b;
        n_ignored++;
      end
      @(negedge clk);
      start = 0;
      cyc++;
    end
    check($sformatf("%s latency %0d", o.name(), cyc), cyc == latency(o));
    ey2 = '0;
    case (o)
      OP_AND:  ey = ea & eb;
      OP_XOR:  ey = ea ^ eb;
      OP_SQR:  begin ey = ref_rotl(ea, M, 1);     ey2 = ref_rotl(eb, M, 1);     end
      OP_SQRT: begin ey = ref_rotl(ea, M, M - 1); ey2 = ref_rotl(eb, M, M - 1); end
      OP_MUL:  ey = ref_mul(ea, eb, M, ONB_TYPE);
      default: ey = ref_inv(ea, M, ONB_TYPE);
    endcase
    check($sformatf("%s result", o.name()), elem_t'(y) == ey);
    if (o == OP_SQR || o == OP_SQRT) check($sformatf("%s second result", o.name()), elem_t'(y2) == ey2);
    if (o == OP_INV && ea != '0)
      check("a * a^-1 = 1", ref_mul(ea, elem_t'(y), M, ONB_TYPE) == ref_one(M));
    n_op[int'(o)]++;
    // results stay until the next start
    @(negedge clk);
    check("result held", elem_t'(y) == ey);
  endtask

  initial begin
    elem_t ea, eb;
    checks = 0; failures = 0; n_ignored = 0; finished = 0;
    foreach (n_op[i]) n_op[i] = 0;
    start = 0; op = OP_AND; a = '0; b = '0;
    @(posedge rst_n);
    repeat (2) @(negedge clk);
    run(OP_INV, ref_one(M), '0);
    run(OP_INV, '0, '0);
    run(OP_MUL, ref_one(M), ref_rand(M));
    for (int n = 0; n < N_RAND; n++) begin
      ea = ref_rand(M); eb = ref_rand(M);
      for (int o = 0; o < 6; o++) run(fau_op_e'(o), ea, eb);
    end
    finished = 1;
  end

endmodule
