// down_counter: loadable down counter with a zero flag. The field arithmetic
// unit uses two: one counts the m clock cycles of a bit-serial multiplication,
// the other the Itoh-Tsujii iteration index s.
//
// load has priority over dec; the count wraps below zero. The document only
// names "two down counters"; width and wrap behaviour are this design's own.
// rst_n clears the count asynchronously.
module down_counter #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] init,
  input  logic         dec,
  output logic [W-1:0] count,
  output logic         zero
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    count <= '0;
    else if (load) count <= init;
    else if (dec)  count <= count - 1'b1;
  end

  assign zero = (count == '0);

endmodule
