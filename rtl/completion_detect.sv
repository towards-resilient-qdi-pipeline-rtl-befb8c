// completion_detect: completion detector of an N-bit dual-rail word.
//
// Each bit is valid when one of its rails is high (an OR gate per bit); a
// C-element over all bit flags makes the result rise only when every bit
// holds a token and fall only when every bit has returned to the spacer.
// The result is the acknowledge a WCHB stage sends to its predecessor.
// Interface: rst, data[N-1:0] (dual-rail word), done.
// Timing: combinational OR level followed by one state-holding C-element.
// The OR detector follows the pipeline described; the single N-input
// C-element (rather than a tree of 2-input ones) is this implementation's
// choice and behaves the same.
module completion_detect
  import qdi_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic         rst,
  input  dr_t  [N-1:0] data,
  output logic         done
);

  logic [N-1:0] bit_valid;

  always_comb begin
    for (int i = 0; i < N; i++)
      bit_valid[i] = data[i].t | data[i].f;
  end

  c_element #(.N(N)) u_c (
    .rst (rst),
    .in  (bit_valid),
    .out (done)
  );

endmodule
