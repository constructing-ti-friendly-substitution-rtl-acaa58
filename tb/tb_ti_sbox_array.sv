// tb_ti_sbox_array -- test of the lock-step Sbox array with 5 lanes of S4 and
// 3 lanes of S8: every lane gets its own random input sharing; each lane's
// output shares must XOR to the published Sbox of its own input, and done
// must come 28 / 78 cycles after start for the whole array.
module tb_ti_sbox_array;
  import ti_sbox_pkg::*;

  localparam int unsigned P4 = 5, P8 = 3;
  int checks = 0, failures = 0;

  localparam logic [3:0] S4_TABLE [16] = '{4'h0, 4'h4, 4'h8, 4'hA, 4'hF, 4'hC, 4'h6, 4'h9,
                                           4'h1, 4'hE, 4'hB, 4'hD, 4'h7, 4'h5, 4'h3, 4'h2};
  logic [7:0] s8_table [256];

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start4 = 0, busy4, done4, start8 = 0, busy8, done8;
  logic [P4-1:0][2:0][3:0] x4 = '0, y4;
  logic [P8-1:0][2:0][7:0] x8 = '0, y8;

  ti_sbox_array #(.PAR(P4)) dut4 (.clk, .rst_n, .start(start4), .x_sh(x4), .busy(busy4),
                                  .done(done4), .y_sh(y4));
  ti_sbox_array #(.PAR(P8), .N(S8_N), .ROUNDS(S8_ROUNDS), .LIN(S8_LIN), .QUAD(S8_QUAD),
                  .A_COL(S8_A_COL))
    dut8 (.clk, .rst_n, .start(start8), .x_sh(x8), .busy(busy8), .done(done8), .y_sh(y8));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    logic [P4-1:0][2:0][3:0] xi4;
    logic [P8-1:0][2:0][7:0] xi8;
    int lat4, lat8;
    $readmemh("tb/s8_sbox.hex", s8_table);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 100; t++) begin
      for (int p = 0; p < int'(P4); p++) xi4[p] = 12'($urandom);
      for (int p = 0; p < int'(P8); p++) xi8[p] = 24'($urandom);
      @(negedge clk);
      x4 = xi4; x8 = xi8; start4 = 1; start8 = 1;
      @(negedge clk);
      start4 = 0; start8 = 0; x4 = '0; x8 = '0;
      lat4 = 0; lat8 = 0;
      while (!done8) begin
        @(negedge clk);
        lat8++;
        if (done4) begin
          lat4 = lat8;
          for (int p = 0; p < int'(P4); p++)
            check((y4[p][0] ^ y4[p][1] ^ y4[p][2]) == S4_TABLE[xi4[p][0] ^ xi4[p][1] ^ xi4[p][2]],
                  $sformatf("S4 lane %0d", p));
        end
      end
      for (int p = 0; p < int'(P8); p++)
        check((y8[p][0] ^ y8[p][1] ^ y8[p][2]) == s8_table[xi8[p][0] ^ xi8[p][1] ^ xi8[p][2]],
              $sformatf("S8 lane %0d", p));
      check(lat4 == 28, $sformatf("S4 array latency %0d", lat4));
      check(lat8 == 78, $sformatf("S8 array latency %0d", lat8));
      check(!busy4 && !busy8, "idle after done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
