// tb_ti_share_reg -- random test of the double-rotating input register
// (n = 8) against a behavioural model: load, bit rotation (right by one in
// every share), share rotation (share s <- share s+1) and hold.
module tb_ti_share_reg;

  localparam int unsigned N = 8;
  int checks = 0, failures = 0;
  int n_load = 0, n_rb = 0, n_rs = 0;

  logic clk = 0, rst_n = 0;
  logic load = 0, rot_bits = 0, rot_shares = 0;
  logic [2:0][N-1:0] load_val = '0, q, model;

  ti_share_reg #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    model = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < 2000; t++) begin
      int op;
      op = $urandom_range(0, 3);
      load       <= (op == 0);
      rot_bits   <= (op == 1);
      rot_shares <= (op == 2);
      load_val   <= {8'($urandom), 8'($urandom), 8'($urandom)};
      @(posedge clk);
      case (op)
        0: begin model = load_val; n_load++; end
        1: begin for (int s = 0; s < 3; s++) model[s] = {model[s][0], model[s][N-1:1]}; n_rb++; end
        2: begin model = {model[0], model[2], model[1]}; n_rs++; end
        default: ;
      endcase
      #1;
      checks++;
      if (q != model) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d op=%0d q=%h model=%h", t, op, q, model);
      end
    end
    checks++;
    if (n_load == 0 || n_rb == 0 || n_rs == 0) failures++;
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
