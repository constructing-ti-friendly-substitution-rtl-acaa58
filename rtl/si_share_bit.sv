// si_share_bit -- the 1-bit gadget of the threshold implementation.
//
// Computes bit 0 of one output share of the direct 3-share sharing of a
// quadratic shift-invariant permutation S with coefficient function f. With
// input shares x^0, x^1, x^2 the output shares are
//   y^0 = g(x^1, x^2),  y^1 = g(x^2, x^0),  y^2 = g(x^0, x^1)
//   g(a, b) = sum_j LIN[j] a_j  ^  sum_{i<j} QUAD[i][j] (a_i a_j ^ a_i b_j ^ b_i a_j)
// so every output share misses one input share (non-completeness). Bit k of a
// share is obtained by feeding both inputs rotated right by k, which is why a
// single gadget serves all 3n output bits. Purely combinational; the gadget
// is the only nonlinear logic of the Sbox. LIN and QUAD come from ti_sbox_pkg.
// Direct sharing and the single 2n-input gadget are published; the exact
// split of each quadratic term between the shares is this design's choice
// (any split that stays correct and uniform would do).
module si_share_bit #(
  parameter int unsigned               N    = 4,
  parameter logic [N-1:0]              LIN  = 4'h1,
  parameter logic [N-1:0][N-1:0]       QUAD = '{4'h0, 4'h0, 4'hC, 4'hC}
) (
  input  logic [N-1:0] a,   // first input share (the one carrying the linear part)
  input  logic [N-1:0] b,   // second input share
  output logic         y
);

  always_comb begin
    y = ^(LIN & a);
    for (int i = 0; i < int'(N); i++) begin
      for (int j = i + 1; j < int'(N); j++) begin
        if (QUAD[i][j]) y ^= (a[i] & a[j]) ^ (a[i] & b[j]) ^ (b[i] & a[j]);
      end
    end
  end

endmodule
