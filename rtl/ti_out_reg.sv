// ti_out_reg -- serial-in output register of the serial TI (3n bits).
//
// Every gadget evaluation shifts one new bit in at the top; earlier bits move
// down one place. The gadget produces share 0 bits 0..n-1, then share 1, then
// share 2, so after 3n shifts q[s][i] is bit i of output share s. q_next is
// the value the register takes at the next edge when shift_en is high; the
// core uses it to load the next SPN round without a spare cycle.
// The serial output register is the published structure; its length (3n)
// and bit ordering are this design's own.
// Synchronous active-low reset clears the register. The oldest bit (flat[0])
// is shifted out and dropped, which lint reports as an unused bit.
module ti_out_reg #(
  parameter int unsigned N = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               shift_en,
  input  logic               din,
  output logic [2:0][N-1:0]  q,
  output logic [2:0][N-1:0]  q_next
);

  logic [3*N-1:0] flat;

  assign flat   = q;
  assign q_next = {din, flat[3*N-1:1]};

  always_ff @(posedge clk) begin
    if (!rst_n)        q <= '0;
    else if (shift_en) q <= q_next;
  end

endmodule
