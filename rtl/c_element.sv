// c_element: N-input Muller C-element with asynchronous reset.
//
// The output rises when every input is 1, falls when every input is 0 and
// keeps its value while the inputs disagree. It is the state-holding gate of
// all QDI stages and DIMS function blocks in this design. It is written as a
// level-sensitive latch (the hold state is the latch's storage loop); the
// active-high reset clears the state to 0, i.e. to the spacer phase.
// Timing: no clock; the output follows the inputs after the gate delay.
// Behaviour follows the regular Muller C-element; the reset input is a choice
// of this implementation, since a pipeline must start from a known spacer.
// Lint reports this latch's storage feedback, and the handshake loops that
// pass through it in a pipeline, as circular logic: they are the intended
// asynchronous feedback of a clockless circuit.
module c_element #(
  parameter int unsigned N = 2
) (
  input  logic         rst,
  input  logic [N-1:0] in,
  output logic         out
);

  always_latch begin
    if (rst)
      out = 1'b0;
    else if (&in)
      out = 1'b1;
    else if (~|in)
      out = 1'b0;
  end

endmodule
