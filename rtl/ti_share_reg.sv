// ti_share_reg -- the 3 x n "double-rotating" input register of the serial TI.
//
// Holds the three n-bit shares of the Sbox state. Per clock it either loads a
// new state, rotates every share right by one bit (bit i <- bit i+1, so after
// k rotations a share holds x >>> k and the gadget sees the inputs of output
// bit k), or rotates the shares (share s <- share s+1) so the next pair of
// shares reaches the gadget taps. Load has priority over the rotations; bit
// and share rotation are never requested together. The taps are the whole of
// shares 1 and 2, which are the gadget's (a, b) inputs.
// Synchronous active-low reset clears the register.
// The three-row register with bit and share rotation is the published
// structure; rotation directions, tap choice and load priority are this
// design's own.
module ti_share_reg #(
  parameter int unsigned N = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               load,
  input  logic [2:0][N-1:0]  load_val,
  input  logic               rot_bits,
  input  logic               rot_shares,
  output logic [2:0][N-1:0]  q
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      q <= '0;
    end else if (load) begin
      q <= load_val;
    end else if (rot_bits) begin
      for (int s = 0; s < 3; s++) q[s] <= {q[s][0], q[s][N-1:1]};
    end else if (rot_shares) begin
      q <= {q[0], q[2], q[1]};
    end
  end

endmodule
