// tb_ti_out_reg -- random test of the serial-in output register (n = 4):
// after 3n enabled shifts the first bit shifted in must sit at q[0][0] and
// the last at q[2][n-1]; disabled cycles must hold the value; q_next must be
// the value taken at the next enabled edge.
module tb_ti_out_reg;

  localparam int unsigned N = 4;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, shift_en = 0, din = 0;
  logic [2:0][N-1:0] q, q_next;
  logic [3*N-1:0] model;

  ti_out_reg #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    model = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    #1 check(q == '0, "reset value");
    for (int t = 0; t < 1000; t++) begin
      logic en, d;
      en = 1'($urandom);
      d  = 1'($urandom);
      shift_en <= en;
      din      <= d;
      #1;
      if (en) check(q_next == {d, model[3*N-1:1]}, $sformatf("q_next t=%0d", t));
      @(posedge clk);
      if (en) model = {d, model[3*N-1:1]};
      #1 check(q == model, $sformatf("q t=%0d", t));
    end
    // Ordering: shift in 3N known bits, bit k of the stream = k-th shifted bit.
    for (int k = 0; k < 3 * N; k++) begin
      shift_en <= 1; din <= (k % 5 == 0) || (k == 3 * N - 1);
      @(posedge clk);
    end
    shift_en <= 0;
    #1;
    for (int k = 0; k < 3 * N; k++)
      check(q[k / N][k % N] == ((k % 5 == 0) || (k == 3 * N - 1)), $sformatf("order bit %0d", k));
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
