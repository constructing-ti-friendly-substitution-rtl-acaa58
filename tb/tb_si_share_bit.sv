// tb_si_share_bit -- self-checking test of the 1-bit TI gadget.
//
// Builds the full direct sharing of S from 3n gadget copies (every share,
// every bit rotation) for both Sboxes and checks:
//  * S4: for all 4096 share triples, the XOR of the output shares equals the
//    published 4-bit permutation table, each share equals an independently
//    written closed form of g, and the 4096 output triples are all distinct
//    (uniformity: the shared map is a 12-bit permutation);
//  * S8: for 4000 random share triples, the XOR of the output shares equals
//    the published 8-bit permutation table (read from s8_perm.hex).
module tb_si_share_bit;
  import ti_sbox_pkg::*;

  int checks = 0, failures = 0;

  // Published 4-bit shift-invariant permutation (input 0..F).
  localparam logic [3:0] S4_PERM [16] = '{4'h0, 4'h1, 4'h2, 4'h9, 4'h4, 4'hA, 4'h3, 4'h7,
                                          4'h8, 4'hC, 4'h5, 4'hB, 4'h6, 4'hD, 4'hE, 4'hF};
  logic [7:0] s8_perm [256];

  function automatic logic [3:0] rotr4(logic [3:0] v, int k);
    return (v >> k) | (v << (4 - k));
  endfunction
  function automatic logic [7:0] rotr8(logic [7:0] v, int k);
    return (v >> k) | (v << (8 - k));
  endfunction
  // Closed form of one S4 share: g(a,b) = a0 ^ (a0^a1)(a2^a3) ^ (a0^a1)(b2^b3) ^ (b0^b1)(a2^a3)
  function automatic logic g4_ref(logic [3:0] a, logic [3:0] b);
    return a[0] ^ ((a[0]^a[1]) & (a[2]^a[3])) ^ ((a[0]^a[1]) & (b[2]^b[3]))
                ^ ((b[0]^b[1]) & (a[2]^a[3]));
  endfunction

  logic [2:0][3:0] x4;
  logic [2:0][3:0] y4;
  logic [2:0][7:0] x8;
  logic [2:0][7:0] y8;

  for (genvar s = 0; s < 3; s++) begin : g_s
    for (genvar k = 0; k < 4; k++) begin : g_k4
      si_share_bit #(.N(4), .LIN(S4_LIN), .QUAD(S4_QUAD)) u4 (
        .a(rotr4(x4[(s+1)%3], k)), .b(rotr4(x4[(s+2)%3], k)), .y(y4[s][k]));
    end
    for (genvar k = 0; k < 8; k++) begin : g_k8
      si_share_bit #(.N(8), .LIN(S8_LIN), .QUAD(S8_QUAD)) u8 (
        .a(rotr8(x8[(s+1)%3], k)), .b(rotr8(x8[(s+2)%3], k)), .y(y8[s][k]));
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    bit seen [4096];
    int distinct;
    $readmemh("tb/s8_perm.hex", s8_perm);
    x4 = '0; x8 = '0;
    foreach (seen[i]) seen[i] = 1'b0;
    distinct = 0;
    for (int v = 0; v < 4096; v++) begin
      x4 = v[11:0];
      #1;
      check((y4[0] ^ y4[1] ^ y4[2]) == S4_PERM[x4[0] ^ x4[1] ^ x4[2]],
            $sformatf("S4 correctness in=%03h", v));
      for (int s = 0; s < 3; s++)
        for (int k = 0; k < 4; k++)
          check(y4[s][k] == g4_ref(rotr4(x4[(s+1)%3], k), rotr4(x4[(s+2)%3], k)),
                $sformatf("S4 share %0d bit %0d in=%03h", s, k, v));
      if (!seen[y4]) distinct++;
      seen[y4] = 1'b1;
    end
    check(distinct == 4096, $sformatf("S4 sharing uniform (%0d distinct)", distinct));
    for (int t = 0; t < 4000; t++) begin
      x8 = {8'($urandom), 8'($urandom), 8'($urandom)};
      #1;
      check((y8[0] ^ y8[1] ^ y8[2]) == s8_perm[x8[0] ^ x8[1] ^ x8[2]],
            $sformatf("S8 correctness in=%06h", x8));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
