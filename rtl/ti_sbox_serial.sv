// ti_sbox_serial -- 1-bit serial, first-order threshold implementation of a
// shift-invariant SPN Sbox (S4 by default; S8 with the ti_sbox_pkg S8_*
// constants).
//
// The Sbox state is held as three n-bit Boolean shares in a double-rotating
// input register. A single 1-bit gadget computes one output bit of one share
// per cycle from two input shares; rotating the bits of the register steps
// through the n output bits, rotating the shares steps through the three
// output shares. The bits are collected in a 3n-bit output register. A
// pre-charge cycle, in which the gadget inputs are forced to zero, separates
// every switch between shares. At the end of each round except the last, the
// round's output shares pass through the linear layer A^2 (one copy per
// share) back into the input register. No fresh randomness is used.
//
// Interface: pulse start while busy is low with the shared input on x_sh
// (x = x_sh[0] ^ x_sh[1] ^ x_sh[2]). After ROUNDS*(3N+2) cycles done pulses
// for one cycle and y_sh holds the output shares, XOR-ing to Sbox(x); y_sh
// stays valid until the next start. Synchronous active-low reset.
//
// The datapath structure, round structure, pre-charge rule and cycle count
// follow the published design; the handshake, the register ordering and the
// placement of the pre-charge cycles inside a round are choices of this RTL.
// Share 0 of the input register is never tapped directly (it reaches the
// gadget only through share rotation), so lint reports state_q[0] as unused.
module ti_sbox_serial
  import ti_sbox_pkg::*;
#(
  parameter int unsigned          N      = S4_N,
  parameter int unsigned          ROUNDS = S4_ROUNDS,
  parameter logic [N-1:0]         LIN    = S4_LIN,
  parameter logic [N-1:0][N-1:0]  QUAD   = S4_QUAD,
  parameter logic [N-1:0]         A_COL  = S4_A_COL
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [2:0][N-1:0]  x_sh,
  output logic               busy,
  output logic               done,
  output logic [2:0][N-1:0]  y_sh
);

  logic              load, eval, precharge, next_round;
  logic [2:0][N-1:0] state_q, load_val, out_next, lin_out;
  logic [N-1:0]      gad_a, gad_b;
  logic              gad_y;

  ti_sbox_ctrl #(.N(N), .ROUNDS(ROUNDS)) u_ctrl (
    .clk, .rst_n, .start, .busy, .load, .eval, .precharge, .next_round, .done
  );

  ti_share_reg #(.N(N)) u_in_reg (
    .clk, .rst_n,
    .load       (load | next_round),
    .load_val   (load_val),
    .rot_bits   (eval),
    .rot_shares (precharge),
    .q          (state_q)
  );

  // Gadget inputs are the two upper shares; zero outside gadget cycles
  // (pre-charge and idle).
  assign gad_a = eval ? state_q[1] : '0;
  assign gad_b = eval ? state_q[2] : '0;

  si_share_bit #(.N(N), .LIN(LIN), .QUAD(QUAD)) u_gadget (
    .a (gad_a), .b (gad_b), .y (gad_y)
  );

  ti_out_reg #(.N(N)) u_out_reg (
    .clk, .rst_n,
    .shift_en (eval),
    .din      (gad_y),
    .q        (y_sh),
    .q_next   (out_next)
  );

  for (genvar s = 0; s < 3; s++) begin : g_lin
    xtime_a2 #(.N(N), .A_COL(A_COL)) u_a2 (.x(out_next[s]), .y(lin_out[s]));
  end

  assign load_val = load ? x_sh : lin_out;

endmodule
