// ti_sbox_array -- PAR serial TI Sboxes operating in lock step.
//
// Each lane is a complete ti_sbox_serial core (its own controller, input and
// output register and 1-bit gadget); all lanes share clock, reset and start,
// so they finish in the same cycle. With PAR*3*N = 384 this is a 384-bit
// shared state: 32 lanes of S4 or 16 lanes of S8. busy and done are the AND
// of the lanes' flags (they are identical by construction). Lane p's shares
// are x_sh[p] / y_sh[p]; timing is that of ti_sbox_serial.
// The lane counts are the published 384-bit evaluation setup; giving every
// lane its own controller is this design's choice.
module ti_sbox_array
  import ti_sbox_pkg::*;
#(
  parameter int unsigned          PAR    = 32,
  parameter int unsigned          N      = S4_N,
  parameter int unsigned          ROUNDS = S4_ROUNDS,
  parameter logic [N-1:0]         LIN    = S4_LIN,
  parameter logic [N-1:0][N-1:0]  QUAD   = S4_QUAD,
  parameter logic [N-1:0]         A_COL  = S4_A_COL
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  input  logic [PAR-1:0][2:0][N-1:0]   x_sh,
  output logic                         busy,
  output logic                         done,
  output logic [PAR-1:0][2:0][N-1:0]   y_sh
);

  logic [PAR-1:0] busy_v, done_v;

  for (genvar p = 0; p < PAR; p++) begin : g_lane
    ti_sbox_serial #(
      .N(N), .ROUNDS(ROUNDS), .LIN(LIN), .QUAD(QUAD), .A_COL(A_COL)
    ) u_sbox (
      .clk, .rst_n, .start,
      .x_sh (x_sh[p]),
      .busy (busy_v[p]),
      .done (done_v[p]),
      .y_sh (y_sh[p])
    );
  end

  assign busy = &busy_v;
  assign done = &done_v;

endmodule
