// c_element_plus: Muller C-element with one positive (asymmetric) input.
//
// The output rises when the N regular inputs and the positive input are all
// 1. It falls when the N regular inputs are all 0, whatever the positive
// input does: the positive input takes part only in the up-transition.
// Otherwise the output holds. In the resilient buffer the positive input
// carries the filtered, interlocked copy of the data rail, so a rail can only
// be captured after it has passed the interlock.
// Interface: rst (active high, clears to 0), in[N-1:0], pos, out.
// Behaviour follows the C-element+ symbol of the MCE family; the reset is a
// choice of this implementation.
// Lint reports the loops through this latch as circular logic; they are the
// intended feedback of the interlock and of the handshake.
module c_element_plus #(
  parameter int unsigned N = 2
) (
  input  logic         rst,
  input  logic [N-1:0] in,
  input  logic         pos,
  output logic         out
);

  always_latch begin
    if (rst)
      out = 1'b0;
    else if ((&in) & pos)
      out = 1'b1;
    else if (~|in)
      out = 1'b0;
  end

endmodule
