// tb_ti_sbox_serial -- end-to-end test of the serial TI Sbox core for both
// configurations, against the published Sbox tables.
//  * S4: all 4096 input share triples. The output shares must XOR to the
//    published 4-bit Sbox of the unshared input, and the 4096 output triples
//    must all differ (the shared Sbox is a 12-bit permutation: uniform).
//  * S8: every one of the 256 inputs with random shares; outputs must XOR to
//    the published 8-bit Sbox (s8_sbox.hex).
//  * Latency: done exactly 28 (S4) and 78 (S8) cycles after start.
//  * Pre-charge: in every pre-charge cycle the gadget inputs are all zero;
//    the number of pre-charge cycles per operation is 2 per round.
module tb_ti_sbox_serial;
  import ti_sbox_pkg::*;

  int checks = 0, failures = 0;
  int n_prech = 0, n_next_round = 0;

  localparam logic [3:0] S4_TABLE [16] = '{4'h0, 4'h4, 4'h8, 4'hA, 4'hF, 4'hC, 4'h6, 4'h9,
                                           4'h1, 4'hE, 4'hB, 4'hD, 4'h7, 4'h5, 4'h3, 4'h2};
  logic [7:0] s8_table [256];

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start4 = 0, busy4, done4;
  logic [2:0][3:0] x4 = '0, y4;
  logic start8 = 0, busy8, done8;
  logic [2:0][7:0] x8 = '0, y8;

  ti_sbox_serial dut4 (.clk, .rst_n, .start(start4), .x_sh(x4), .busy(busy4), .done(done4), .y_sh(y4));
  ti_sbox_serial #(.N(S8_N), .ROUNDS(S8_ROUNDS), .LIN(S8_LIN), .QUAD(S8_QUAD), .A_COL(S8_A_COL))
    dut8 (.clk, .rst_n, .start(start8), .x_sh(x8), .busy(busy8), .done(done8), .y_sh(y8));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // Pre-charge monitor on both cores.
  always @(posedge clk) if (rst_n) begin
    if (dut4.precharge) begin
      n_prech++;
      check(dut4.gad_a == '0 && dut4.gad_b == '0, "S4 gadget inputs zero in pre-charge");
    end
    if (dut8.precharge) begin
      n_prech++;
      check(dut8.gad_a == '0 && dut8.gad_b == '0, "S8 gadget inputs zero in pre-charge");
    end
    if (dut4.next_round) n_next_round++;
    if (dut8.next_round) n_next_round++;
  end

  task automatic op4(logic [2:0][3:0] xin, output logic [2:0][3:0] yout, output int lat);
    @(negedge clk);
    x4 = xin; start4 = 1;
    @(negedge clk);
    start4 = 0; x4 = '0;
    lat = 0;  // edges after the one that sampled start
    while (!done4) begin @(negedge clk); lat++; end
    yout = y4;
  endtask

  task automatic op8(logic [2:0][7:0] xin, output logic [2:0][7:0] yout, output int lat);
    @(negedge clk);
    x8 = xin; start8 = 1;
    @(negedge clk);
    start8 = 0; x8 = '0;
    lat = 0;  // edges after the one that sampled start
    while (!done8) begin @(negedge clk); lat++; end
    yout = y8;
  endtask

  initial begin
    bit seen [4096];
    int distinct, lat, pc_before;
    logic [2:0][3:0] yo4;
    logic [2:0][7:0] yo8, xi8;
    $readmemh("tb/s8_sbox.hex", s8_table);
    foreach (seen[i]) seen[i] = 1'b0;
    distinct = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int v = 0; v < 4096; v++) begin
      logic [2:0][3:0] xi;
      xi = v[11:0];
      pc_before = n_prech;
      op4(xi, yo4, lat);
      check((yo4[0] ^ yo4[1] ^ yo4[2]) == S4_TABLE[xi[0] ^ xi[1] ^ xi[2]],
            $sformatf("S4 in=%03h out=%03h", xi, yo4));
      check(lat == S4_ROUNDS * (3 * S4_N + 2), $sformatf("S4 latency %0d", lat));
      check(n_prech - pc_before == 2 * S4_ROUNDS, "S4 pre-charge cycles per operation");
      if (!seen[yo4]) distinct++;
      seen[yo4] = 1'b1;
    end
    check(distinct == 4096, $sformatf("S4 shared Sbox uniform: %0d distinct", distinct));
    for (int v = 0; v < 256; v++) begin
      xi8[0] = 8'($urandom);
      xi8[1] = 8'($urandom);
      xi8[2] = v[7:0] ^ xi8[0] ^ xi8[1];
      op8(xi8, yo8, lat);
      check((yo8[0] ^ yo8[1] ^ yo8[2]) == s8_table[v], $sformatf("S8 in=%02h out=%02h", v,
            yo8[0] ^ yo8[1] ^ yo8[2]));
      check(lat == S8_ROUNDS * (3 * S8_N + 2), $sformatf("S8 latency %0d", lat));
    end
    check(n_next_round == 4096 * (S4_ROUNDS - 1) + 256 * (S8_ROUNDS - 1), "round transitions");
    $display("pre-charge cycles=%0d round transitions=%0d", n_prech, n_next_round);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
