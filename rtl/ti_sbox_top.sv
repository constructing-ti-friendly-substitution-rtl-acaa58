// ti_sbox_top -- the two threshold-implemented Sboxes side by side, each
// widened to a 384-bit shared state as for the side-channel evaluation:
// 32 parallel S4 (4-bit, 2 rounds, 28 cycles) and 16 parallel S8 (8-bit,
// 3 rounds, 78 cycles). The two arrays are independent: each has its own
// start / busy / done and its own shared input and output. Input shares of
// lane p: x4_sh[p][s] for s = 0..2, unshared value x = XOR of the three.
// Sizes follow the published evaluation setup; putting both Sboxes into
// one top with separate handshakes is this design's choice. Results are
// valid when the matching done pulses (see ti_sbox_serial for timing).
module ti_sbox_top
  import ti_sbox_pkg::*;
#(
  parameter int unsigned PAR4 = 32,
  parameter int unsigned PAR8 = 16
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // S4 array
  input  logic                              start4,
  input  logic [PAR4-1:0][2:0][S4_N-1:0]    x4_sh,
  output logic                              busy4,
  output logic                              done4,
  output logic [PAR4-1:0][2:0][S4_N-1:0]    y4_sh,
  // S8 array
  input  logic                              start8,
  input  logic [PAR8-1:0][2:0][S8_N-1:0]    x8_sh,
  output logic                              busy8,
  output logic                              done8,
  output logic [PAR8-1:0][2:0][S8_N-1:0]    y8_sh
);

  ti_sbox_array #(
    .PAR(PAR4), .N(S4_N), .ROUNDS(S4_ROUNDS),
    .LIN(S4_LIN), .QUAD(S4_QUAD), .A_COL(S4_A_COL)
  ) u_s4 (
    .clk, .rst_n, .start(start4), .x_sh(x4_sh), .busy(busy4), .done(done4), .y_sh(y4_sh)
  );

  ti_sbox_array #(
    .PAR(PAR8), .N(S8_N), .ROUNDS(S8_ROUNDS),
    .LIN(S8_LIN), .QUAD(S8_QUAD), .A_COL(S8_A_COL)
  ) u_s8 (
    .clk, .rst_n, .start(start8), .x_sh(x8_sh), .busy(busy8), .done(done8), .y_sh(y8_sh)
  );

endmodule
