// tb_ti_sbox_top -- end-to-end test of the full design at its default size:
// 32 lanes of S4 and 16 lanes of S8 (384 shared bits each), both arrays run
// concurrently and with staggered starts.
//  * S8: 16 operations cover all 256 inputs (lane p of operation t gets
//    input 16t+p), each with a fresh random sharing.
//  * S4: 24 operations with random inputs and sharings; one of them sees a
//    second start pulse while busy, which must be ignored.
//  * Every lane's output shares must XOR to the published Sbox of its input;
//    done must come 28 (S4) / 78 (S8) cycles after start.
//  * Mechanisms counted and required to occur: pre-charge cycles (with the
//    gadget inputs at zero), share rotations, round transitions through A^2,
//    ignored start while busy, both arrays busy in the same cycle.
module tb_ti_sbox_top;
  import ti_sbox_pkg::*;

  localparam int unsigned P4 = 32, P8 = 16;
  int checks = 0, failures = 0;
  int n_prech = 0, n_rot_sh = 0, n_round = 0, n_ignored = 0, n_overlap = 0;

  localparam logic [3:0] S4_TABLE [16] = '{4'h0, 4'h4, 4'h8, 4'hA, 4'hF, 4'hC, 4'h6, 4'h9,
                                           4'h1, 4'hE, 4'hB, 4'hD, 4'h7, 4'h5, 4'h3, 4'h2};
  logic [7:0] s8_table [256];

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start4 = 0, busy4, done4, start8 = 0, busy8, done8;
  logic [P4-1:0][2:0][3:0] x4_sh = '0, y4_sh;
  logic [P8-1:0][2:0][7:0] x8_sh = '0, y8_sh;

  ti_sbox_top dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (dut.u_s4.g_lane[0].u_sbox.precharge) begin
      n_prech++;
      check(dut.u_s4.g_lane[0].u_sbox.gad_a == '0 && dut.u_s4.g_lane[0].u_sbox.gad_b == '0,
            "S4 pre-charge zero inputs");
    end
    if (dut.u_s8.g_lane[7].u_sbox.precharge) begin
      n_prech++;
      check(dut.u_s8.g_lane[7].u_sbox.gad_a == '0 && dut.u_s8.g_lane[7].u_sbox.gad_b == '0,
            "S8 pre-charge zero inputs");
    end
    if (dut.u_s4.g_lane[0].u_sbox.u_in_reg.rot_shares) n_rot_sh++;
    if (dut.u_s8.g_lane[0].u_sbox.u_in_reg.rot_shares) n_rot_sh++;
    if (dut.u_s4.g_lane[0].u_sbox.next_round) n_round++;
    if (dut.u_s8.g_lane[0].u_sbox.next_round) n_round++;
    if (busy4 && busy8) n_overlap++;
  end

  task automatic run4(int t);
    logic [P4-1:0][2:0][3:0] xi;
    int lat;
    for (int p = 0; p < int'(P4); p++) xi[p] = 12'($urandom);
    @(negedge clk);
    x4_sh = xi; start4 = 1;
    @(negedge clk);
    start4 = 0; x4_sh = ~xi;   // input changes after start must not matter
    lat = 0;
    while (!done4) begin
      @(negedge clk);
      lat++;
      if (t == 5 && lat == 10) begin   // start while busy: ignored
        start4 = 1; n_ignored++;
      end else start4 = 0;
      if (lat > 200) break;
    end
    check(lat == 28, $sformatf("S4 op %0d latency %0d", t, lat));
    for (int p = 0; p < int'(P4); p++)
      check((y4_sh[p][0] ^ y4_sh[p][1] ^ y4_sh[p][2]) == S4_TABLE[xi[p][0] ^ xi[p][1] ^ xi[p][2]],
            $sformatf("S4 op %0d lane %0d", t, p));
  endtask

  task automatic run8(int t);
    logic [P8-1:0][2:0][7:0] xi;
    int lat;
    for (int p = 0; p < int'(P8); p++) begin
      xi[p][0] = 8'($urandom);
      xi[p][1] = 8'($urandom);
      xi[p][2] = 8'(16 * t + p) ^ xi[p][0] ^ xi[p][1];
    end
    @(negedge clk);
    x8_sh = xi; start8 = 1;
    @(negedge clk);
    start8 = 0; x8_sh = '0;
    lat = 0;
    while (!done8) begin
      @(negedge clk);
      lat++;
      if (lat > 400) break;
    end
    check(lat == 78, $sformatf("S8 op %0d latency %0d", t, lat));
    for (int p = 0; p < int'(P8); p++)
      check((y8_sh[p][0] ^ y8_sh[p][1] ^ y8_sh[p][2]) == s8_table[16 * t + p],
            $sformatf("S8 op %0d lane %0d", t, p));
  endtask

  initial begin
    $readmemh("tb/s8_sbox.hex", s8_table);
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      for (int t = 0; t < 16; t++) begin
        run8(t);
        repeat (t % 3) @(posedge clk);
      end
      begin
        repeat (7) @(posedge clk);
        for (int t = 0; t < 24; t++) run4(t);
      end
    join
    // 24 S4 + 16 S8 operations: 2 pre-charge cycles per round.
    check(n_prech == 24 * 2 * S4_ROUNDS + 16 * 2 * S8_ROUNDS, $sformatf("pre-charge count %0d", n_prech));
    check(n_rot_sh == n_prech, "share rotation count");
    check(n_round == 24 * (S4_ROUNDS - 1) + 16 * (S8_ROUNDS - 1), $sformatf("round count %0d", n_round));
    check(n_ignored > 0, "start while busy exercised");
    check(n_overlap > 0, "both arrays busy together");
    $display("pre-charge=%0d share-rotations=%0d round-transitions=%0d ignored-starts=%0d overlap-cycles=%0d",
             n_prech, n_rot_sh, n_round, n_ignored, n_overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
