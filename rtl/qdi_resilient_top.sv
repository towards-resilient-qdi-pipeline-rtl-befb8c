// qdi_resilient_top: the two resilient QDI target circuits side by side.
//
// Both circuits are built entirely from theta (input/output-interlocking SR
// latch WCHB) buffer stages:
//   * fifo_*  an empty pipeline (FIFO) of FIFO_STAGES 4-bit stages;
//   * mul_*   a pipelined 4 x 4 shift-and-add multiplier.
// The two share only the reset; each has its own dual-rail input channel
// (data rails plus the acknowledge it returns) and output channel (data rails
// plus the acknowledge the sink returns). Four-phase return-to-zero
// handshakes, no clock. rst (active high) brings every stage to the spacer.
// The pairing of the two circuits follows the evaluated targets; the common
// reset and port names are this implementation's choice.
module qdi_resilient_top
  import qdi_pkg::*;
#(
  parameter int unsigned W           = qdi_pkg::DATA_W,
  parameter int unsigned FIFO_STAGES = 4
) (
  input  logic           rst,
  // FIFO
  input  dr_t  [W-1:0]   fifo_in,
  output logic           fifo_in_ack,
  output dr_t  [W-1:0]   fifo_out,
  input  logic           fifo_out_ack,
  // multiplier
  input  dr_t  [W-1:0]   mul_a,
  input  dr_t  [W-1:0]   mul_b,
  output logic           mul_in_ack,
  output dr_t  [2*W-1:0] mul_p,
  input  logic           mul_out_ack
);

  qdi_fifo #(.WIDTH(W), .STAGES(FIFO_STAGES)) u_fifo (
    .rst     (rst),
    .in      (fifo_in),
    .in_ack  (fifo_in_ack),
    .out     (fifo_out),
    .out_ack (fifo_out_ack)
  );

  qdi_multiplier #(.W(W)) u_mul (
    .rst     (rst),
    .a       (mul_a),
    .b       (mul_b),
    .in_ack  (mul_in_ack),
    .p       (mul_p),
    .out_ack (mul_out_ack)
  );

endmodule
