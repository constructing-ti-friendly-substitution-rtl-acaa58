// tb_s8_uniformity -- exhaustive uniformity and correctness check of the S8
// gadget sharing: all 2^24 input share triples are fed through 24 gadget
// copies (3 shares x 8 bit rotations). Every output triple must XOR to the
// published 8-bit permutation S of the unshared input, and the 2^24 output
// triples must all differ, i.e. the shared permutation is a bijection on
// 24 bits, so the threshold implementation needs no fresh randomness.
module tb_s8_uniformity;
  import ti_sbox_pkg::*;

  int checks = 0, failures = 0;
  logic [7:0] s8_perm [256];
  bit seen [1 << 24];

  function automatic logic [7:0] rotr8(logic [7:0] v, int k);
    return (v >> k) | (v << (8 - k));
  endfunction

  logic [2:0][7:0] x;
  logic [2:0][7:0] y;

  for (genvar s = 0; s < 3; s++) begin : g_s
    for (genvar k = 0; k < 8; k++) begin : g_k
      si_share_bit #(.N(8), .LIN(S8_LIN), .QUAD(S8_QUAD)) u (
        .a(rotr8(x[(s+1)%3], k)), .b(rotr8(x[(s+2)%3], k)), .y(y[s][k]));
    end
  end

  initial begin
    int bad_xor, repeats;
    $readmemh("tb/s8_perm.hex", s8_perm);
    bad_xor = 0; repeats = 0;
    for (int v = 0; v < (1 << 24); v++) begin
      x = v[23:0];
      #1;
      if ((y[0] ^ y[1] ^ y[2]) != s8_perm[x[0] ^ x[1] ^ x[2]]) bad_xor++;
      if (seen[y]) repeats++;
      seen[y] = 1'b1;
    end
    checks += 2;
    if (bad_xor != 0) begin failures++; $display("FAIL %0d incorrect output triples", bad_xor); end
    if (repeats != 0) begin failures++; $display("FAIL %0d repeated output triples", repeats); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
