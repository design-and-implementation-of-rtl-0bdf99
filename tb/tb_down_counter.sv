// tb_down_counter: random load / decrement sequences on an 8-bit counter,
// checked against an integer model, including the zero flag and wrap-around.
module tb_down_counter;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       load, dec, zero;
  logic [7:0] init, count;
  int         model;
  int         zeros_seen = 0;

  down_counter #(.W(8)) dut (.clk, .rst_n, .load, .init, .dec, .count, .zero);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0; dec = 0; init = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    model = 0;
    for (int n = 0; n < 3000; n++) begin
      load = ($urandom_range(0, 19) == 0);
      dec  = 1'($urandom);
      init = 8'($urandom_range(0, 12));
      if (load)     model = init;
      else if (dec) model = (model + 255) % 256;
      @(posedge clk); #1;
      checks++;
      if (count !== 8'(model) || zero !== (model == 0)) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d count=%0d model=%0d", n, count, model);
      end
      if (zero) zeros_seen++;
    end
    checks++;
    if (zeros_seen == 0) begin failures++; $display("FAIL zero never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
