// ti_sbox_ctrl -- sequencer of the 1-bit serial threshold-implemented Sbox.
//
// One SPN round of the datapath is
//   n gadget cycles (share 0, bits 0..n-1), 1 pre-charge cycle,
//   n gadget cycles (share 1),               1 pre-charge cycle,
//   n gadget cycles (share 2)
// i.e. 3n+2 cycles; ROUNDS rounds give 28 cycles for S4 and 78 for S8.
// During a gadget cycle the gadget inputs are enabled (eval), the output
// register shifts and the input register rotates its bits. During a
// pre-charge cycle the gadget inputs are held at zero and the input register
// rotates its shares. On the last gadget cycle of a round that is not the
// final one, next_round makes the core reload the input register with the
// A^2 image of the round's output. done is a one-cycle pulse in the cycle
// after the final gadget cycle. start is accepted only when idle (busy low).
// Synchronous active-low reset returns to idle.
// The schedule length matches the published cycle counts; where the
// pre-charge cycles sit, the FSM encoding and the handshake are this
// design's own.
module ti_sbox_ctrl #(
  parameter int unsigned N      = 4,
  parameter int unsigned ROUNDS = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic busy,
  output logic load,        // load the input register from the primary input
  output logic eval,        // gadget cycle
  output logic precharge,   // pre-charge cycle (gadget inputs forced to 0)
  output logic next_round,  // reload the input register with A^2(output)
  output logic done
);

  typedef enum logic [1:0] {IDLE, EVAL, PRECH} state_t;

  localparam int unsigned BW = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned RW = (ROUNDS > 1) ? $clog2(ROUNDS) : 1;

  state_t          state;
  logic [BW-1:0]   bit_cnt;
  logic [1:0]      share_cnt;
  logic [RW-1:0]   round_cnt;
  logic            last_bit, last_share, last_round;

  assign last_bit   = (bit_cnt == BW'(N - 1));
  assign last_share = (share_cnt == 2'd2);
  assign last_round = (round_cnt == RW'(ROUNDS - 1));

  assign busy       = (state != IDLE);
  assign load       = (state == IDLE) && start;
  assign eval       = (state == EVAL);
  assign precharge  = (state == PRECH);
  assign next_round = eval && last_bit && last_share && !last_round;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= IDLE;
      bit_cnt   <= '0;
      share_cnt <= '0;
      round_cnt <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: begin
          if (start) begin
            state     <= EVAL;
            bit_cnt   <= '0;
            share_cnt <= '0;
            round_cnt <= '0;
          end
        end
        EVAL: begin
          if (!last_bit) begin
            bit_cnt <= bit_cnt + 1'b1;
          end else begin
            bit_cnt <= '0;
            if (!last_share) begin
              state <= PRECH;
            end else begin
              share_cnt <= '0;
              if (!last_round) begin
                round_cnt <= round_cnt + 1'b1;
              end else begin
                state <= IDLE;
                done  <= 1'b1;
              end
            end
          end
        end
        PRECH: begin
          share_cnt <= share_cnt + 1'b1;
          state     <= EVAL;
        end
        default: state <= IDLE;
      endcase
    end
  end

  // Control outputs are mutually exclusive.
  a_onehot_ctrl: assert property (@(posedge clk) disable iff (!rst_n)
                                  $onehot0({load, eval, precharge}));

endmodule
