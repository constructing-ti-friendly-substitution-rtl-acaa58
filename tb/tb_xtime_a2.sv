// tb_xtime_a2 -- exhaustive test of the linear layer A^2 for both Sboxes.
// The reference multiplies by the published matrices A row by row (row 1 is
// the most significant output bit, column 1 the most significant input bit)
// and applies the product twice.
module tb_xtime_a2;
  import ti_sbox_pkg::*;

  int checks = 0, failures = 0;

  // Rows of A, row 1 first; in each row the MSB is column 1.
  localparam logic [3:0] A4_ROWS [4] = '{4'b1100, 4'b1010, 4'b1001, 4'b1000};
  localparam logic [7:0] A8_ROWS [8] = '{8'b11000000, 8'b00100000, 8'b00010000, 8'b00001000,
                                         8'b10000100, 8'b10000010, 8'b00000001, 8'b10000000};

  function automatic logic [3:0] mul4(logic [3:0] x);
    logic [3:0] y;
    for (int i = 0; i < 4; i++) y[3-i] = ^(A4_ROWS[i] & x);
    return y;
  endfunction
  function automatic logic [7:0] mul8(logic [7:0] x);
    logic [7:0] y;
    for (int i = 0; i < 8; i++) y[7-i] = ^(A8_ROWS[i] & x);
    return y;
  endfunction

  logic [3:0] x4, y4;
  logic [7:0] x8, y8;

  xtime_a2 #(.N(4), .A_COL(S4_A_COL)) dut4 (.x(x4), .y(y4));
  xtime_a2 #(.N(8), .A_COL(S8_A_COL)) dut8 (.x(x8), .y(y8));

  initial begin
    for (int v = 0; v < 256; v++) begin
      x4 = v[3:0]; x8 = v[7:0];
      #1;
      if (v < 16) begin
        checks++;
        if (y4 != mul4(mul4(x4))) begin
          failures++; $display("FAIL A4^2 x=%h got %h", x4, y4);
        end
      end
      checks++;
      if (y8 != mul8(mul8(x8))) begin
        failures++; $display("FAIL A8^2 x=%h got %h", x8, y8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
