// barrel_rotator: combinational left rotation of an m-bit normal-basis
// element by a run-time amount k, 0 <= k < m. Rotating left by k raises the
// element to the power 2^k, which the inversion needs for the step
// "rotate REG2 left by floor(r/2)".
//
// It is built as ceil(log2 m) stages; stage s rotates by 2^s when bit s of k
// is set. Because m is in general not a power of two, each stage is a true
// cyclic rotation of the m-bit word, so any k below m gives the exact result.
// The document names a barrel shifter without describing it; the log-stage
// structure is this design's choice. No clock: the result is valid in the
// same cycle.
module barrel_rotator #(
  parameter int unsigned M  = 173,
  parameter int unsigned KW = (M > 1) ? $clog2(M) : 1
) (
  input  logic [M-1:0]  x,
  input  logic [KW-1:0] k,
  output logic [M-1:0]  y
);

  logic [M-1:0] stage [KW+1];

  assign stage[0] = x;

  for (genvar s = 0; s < KW; s++) begin : g_stage
    localparam int unsigned SH = (2**s) % M;
    logic [M-1:0] rot;
    if (SH == 0) begin : g_none
      assign rot = stage[s];
    end else begin : g_rot
      assign rot = {stage[s][M-1-SH:0], stage[s][M-1:M-SH]};
    end
    assign stage[s+1] = k[s] ? rot : stage[s];
  end

  assign y = stage[KW];

endmodule
