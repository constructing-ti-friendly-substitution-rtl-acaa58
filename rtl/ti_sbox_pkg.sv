// ti_sbox_pkg -- constants and helpers shared by the serial threshold-implemented
// (TI) Sboxes S4 and S8.
//
// Each Sbox is a small substitution-permutation network built from a quadratic
// shift-invariant permutation S (the same Boolean function f applied to every
// rotation of the input) and the linear layer A^2, where A is an "xtime"-like
// map: shift left by one and XOR a fixed column a1 when the top bit was set.
//   S4 = S o A^2 o S             (2 rounds of S, n = 4)
//   S8 = S o A^2 o S o A^2 o S   (3 rounds of S, n = 8)
// Bit i of S(x) is f(x rotated right by i); bit 0 is the least significant bit.
//
// f is stored in algebraic normal form:
//   *_LIN      bit j set  -> linear term x_j
//   *_QUAD[i]  bit j set  -> quadratic term x_i x_j (only j > i is used)
// The ANFs were obtained from the published lookup tables of the two
// permutations; the matrices, round counts and Sbox tables are the published
// ones. The direct 3-share sharing of both permutations is itself a 3n-bit
// permutation, so the TI is uniform and needs no fresh randomness.
package ti_sbox_pkg;

  localparam int unsigned SHARES = 3;

  // ---------------- S4 (4-bit Sbox) ----------------
  // f4 = x0 ^ x0x2 ^ x0x3 ^ x1x2 ^ x1x3 = x0 ^ (x0^x1)(x2^x3)
  localparam int unsigned         S4_N      = 4;
  localparam int unsigned         S4_ROUNDS = 2;
  localparam logic [3:0]          S4_LIN    = 4'h1;
  localparam logic [3:0][3:0]     S4_QUAD   = '{4'h0, 4'h0, 4'hC, 4'hC}; // rows 3..0
  localparam logic [3:0]          S4_A_COL  = 4'hF;

  // ---------------- S8 (8-bit Sbox) ----------------
  // f8 = x2 ^ x5 ^ x6 ^ x0(x1^x2^x4^x5^x6^x7) ^ x1x7 ^ x2(x4^x5^x6)
  //      ^ x3(x5^x6) ^ x4(x6^x7) ^ x5x6 ^ x6x7
  localparam int unsigned         S8_N      = 8;
  localparam int unsigned         S8_ROUNDS = 3;
  localparam logic [7:0]          S8_LIN    = 8'h64;
  localparam logic [7:0][7:0]     S8_QUAD   = '{8'h00, 8'h80, 8'h40, 8'hC0,
                                                 8'h60, 8'h70, 8'h80, 8'hF6}; // rows 7..0
  localparam logic [7:0]          S8_A_COL  = 8'h8D;

  // Cycles per round of the 1-bit serial datapath: 3n gadget evaluations plus
  // one pre-charge cycle before each of the two share switches.
  function automatic int unsigned round_cycles(int unsigned n);
    return SHARES * n + (SHARES - 1);
  endfunction

endpackage
