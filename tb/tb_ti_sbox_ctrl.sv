// tb_ti_sbox_ctrl -- cycle-exact test of the serial Sbox sequencer for the
// S4 (n = 4, 2 rounds) and S8 (n = 8, 3 rounds) configurations. The expected
// per-cycle schedule is rebuilt in the testbench: per round n gadget cycles,
// pre-charge, n gadget cycles, pre-charge, n gadget cycles; next_round on the
// last gadget cycle of every round but the last; done one cycle later, i.e.
// 28 (S4) and 78 (S8) cycles after start. A start while busy must be ignored.
module tb_ti_sbox_ctrl;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  logic start4 = 0, busy4, load4, eval4, pc4, nr4, done4;
  logic start8 = 0, busy8, load8, eval8, pc8, nr8, done8;

  ti_sbox_ctrl #(.N(4), .ROUNDS(2)) dut4 (.clk, .rst_n, .start(start4), .busy(busy4), .load(load4),
    .eval(eval4), .precharge(pc4), .next_round(nr4), .done(done4));
  ti_sbox_ctrl #(.N(8), .ROUNDS(3)) dut8 (.clk, .rst_n, .start(start8), .busy(busy8), .load(load8),
    .eval(eval8), .precharge(pc8), .next_round(nr8), .done(done8));

  // Runs one operation on the selected controller and checks every cycle.
  task automatic run(int n, int rounds, bit use8);
    int cyc, total;
    bit exp_eval, exp_pc, exp_nr;
    total = rounds * (3 * n + 2);
    if (use8) start8 <= 1; else start4 <= 1;
    #1;
    check(use8 ? load8 : load4, "load with start");
    @(posedge clk);
    if (use8) start8 <= 1; else start4 <= 1;  // held high: must be ignored while busy
    for (cyc = 0; cyc < total; cyc++) begin
      int r, p;
      r = cyc / (3 * n + 2);
      p = cyc % (3 * n + 2);
      exp_pc   = (p == n) || (p == 2 * n + 1);
      exp_eval = !exp_pc;
      exp_nr   = (p == 3 * n + 1) && (r != rounds - 1);
      #1;
      if (use8) begin
        check(eval8 == exp_eval && pc8 == exp_pc && nr8 == exp_nr && busy8 && !done8 && !load8,
              $sformatf("S8 cycle %0d: eval=%b pc=%b nr=%b", cyc, eval8, pc8, nr8));
      end else begin
        check(eval4 == exp_eval && pc4 == exp_pc && nr4 == exp_nr && busy4 && !done4 && !load4,
              $sformatf("S4 cycle %0d: eval=%b pc=%b nr=%b", cyc, eval4, pc4, nr4));
      end
      @(posedge clk);
    end
    start4 <= 0; start8 <= 0;
    #1;
    check(use8 ? (done8 && !busy8) : (done4 && !busy4), $sformatf("done after %0d cycles", total));
    @(posedge clk);
    #1;
    check(use8 ? !done8 : !done4, "done is a single pulse");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    #1 check(!busy4 && !busy8 && !done4 && !done8, "idle after reset");
    @(negedge clk);
    run(4, 2, 0);
    repeat (3) @(posedge clk);
    @(negedge clk);
    run(8, 3, 1);
    @(negedge clk);
    run(4, 2, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
