// xtime_a2 -- linear layer A^2 of the Sbox, applied to one share.
//
// A is the n x n binary matrix with the column a1 (A_COL) first and an
// identity shifted by one next to it; on a word whose most significant bit is
// x_1 it is  A x = (x << 1) ^ (A_COL & {n{msb(x)}}),  the "xtime" operation.
// The layer applies it twice. Being linear, it is applied to each share on its
// own, so sharing is preserved. Purely combinational.
// The matrices and the xtime formulation are published; implementing the
// layer as a combinational XOR network is this design's choice.
module xtime_a2 #(
  parameter int unsigned  N     = 4,
  parameter logic [N-1:0] A_COL = 4'hF
) (
  input  logic [N-1:0] x,
  output logic [N-1:0] y
);

  function automatic logic [N-1:0] xtime(input logic [N-1:0] v);
    return {v[N-2:0], 1'b0} ^ (A_COL & {N{v[N-1]}});
  endfunction

  assign y = xtime(xtime(x));

endmodule
