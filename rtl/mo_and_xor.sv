// mo_and_xor: AND plane and XOR tree of the bit-serial Massey-Omura
// multiplier for an optimal normal basis (ONB) of GF(2^m).
//
// In a normal basis product bit k is c_k = sum_ij lambda_ij a_(i+k) b_(j+k)
// with one constant 0/1 matrix lambda = lambda(0). Evaluating it on the
// operands rotated by k gives every other bit, so one copy of this logic
// serves all m bits: the product register collects one bit per clock while
// both operand registers rotate. For an ONB, lambda has 2m-1 ones, at most
// two per row, so the logic is 2m-1 AND gates (one per non-zero entry) and an
// XOR tree of 2m-2 gates, as the document counts them.
//
// lambda(0) is worked out at elaboration from the ONB congruences of the
// document:
//   Type I  (m+1 prime):  lambda_ij = 1 iff 2^i + 2^j = 1 or 0 (mod m+1)
//   Type II (2m+1 prime): lambda_ij = 1 iff 2^i +/- 2^j = +/-1 (mod 2m+1)
// For row i the matching columns j follow from a discrete-log table of 2
// modulo p, so the work is linear in m. Elaboration stops with an error when m
// has no ONB of the chosen type. The per-row column tables are this design's
// way of building the matrix; the equations are the document's.
//
// Interface: purely combinational; c0 = a * lambda * b^T over GF(2).
module mo_and_xor #(
  parameter int unsigned M        = 173,
  parameter int unsigned ONB_TYPE = 2,
  localparam int unsigned IW      = (M > 1) ? $clog2(M) : 1
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic         c0
);

  localparam int unsigned P = (ONB_TYPE == 1) ? M + 1 : 2 * M + 1;

  // Column of the first (sel = 0) or second (sel = 1) non-zero entry of
  // each row of lambda(0).
  function automatic logic [M-1:0][IW-1:0] lambda_cols(input bit sel);
    int idx [P];
    int e, x, v;
    logic [M-1:0][IW-1:0] cols;
    cols = '0;
    for (int t = 0; t < int'(P); t++) idx[t] = 0;
    // idx[v] = j with 2^j = v (Type II: also 2^j = -v) modulo P
    e = 1;
    for (int j = 0; j < int'(M); j++) begin
      idx[e] = j;
      if (ONB_TYPE != 1) idx[int'(P) - e] = j;
      e = (2 * e) % int'(P);
    end
    x = 1;
    for (int i = 0; i < int'(M); i++) begin
      if (sel == 1'b0) v = (ONB_TYPE == 1) ? (int'(P) - x) : ((1 + x) % int'(P));
      else             v = (1 - x + int'(P)) % int'(P);
      cols[i] = IW'(idx[v]);
      x = (2 * x) % int'(P);
    end
    return cols;
  endfunction

  // 1 when every residue the two congruences need has a logarithm, i.e. an
  // ONB of the chosen type exists for M.
  function automatic bit onb_exists();
    bit seen [P];
    int e, n;
    for (int t = 0; t < int'(P); t++) seen[t] = 1'b0;
    for (int d = 2; d < int'(P); d++)
      if (int'(P) % d == 0) return 1'b0;
    e = 1;
    for (int j = 0; j < int'(M); j++) begin
      seen[e] = 1'b1;
      if (ONB_TYPE != 1) seen[int'(P) - e] = 1'b1;
      e = (2 * e) % int'(P);
    end
    n = 0;
    for (int t = 1; t < int'(P); t++) if (seen[t]) n++;
    return n == int'(P) - 1;
  endfunction

  localparam logic [M-1:0][IW-1:0] COL1 = lambda_cols(1'b0);
  localparam logic [M-1:0][IW-1:0] COL2 = lambda_cols(1'b1);

  if (ONB_TYPE != 1 && ONB_TYPE != 2) begin : g_bad_type
    $error("mo_and_xor: ONB_TYPE must be 1 or 2");
  end
  if (!onb_exists()) begin : g_no_onb
    $error("mo_and_xor: no optimal normal basis of this type for this M");
  end

  // AND plane: entry (i, COL1[i]) for every row, entry (i, COL2[i]) for
  // every row but row 0, which has a single one.
  logic [M-1:0] p1, p2;

  for (genvar i = 0; i < int'(M); i++) begin : g_and
    assign p1[i] = a[i] & b[COL1[i]];
    if (i == 0) begin : g_row0
      assign p2[i] = 1'b0;
    end else begin : g_rowi
      assign p2[i] = a[i] & b[COL2[i]];
    end
  end

  // XOR tree.
  assign c0 = ^{p1, p2};

endmodule
