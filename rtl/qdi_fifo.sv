// qdi_fifo: empty QDI pipeline (FIFO) of theta_reg stages.
//
// STAGES half-buffer stages of WIDTH dual-rail bits are chained: the output
// rails of stage s are the input rails of stage s+1, and the ack_out of stage
// s+1 is the ack_in of stage s. With no function blocks between the stages,
// every effect seen at the output is caused by the buffers themselves.
// Interface: rst; in, in_ack (towards the source: data and the acknowledge
// the FIFO returns); out, out_ack (towards the sink: data and the acknowledge
// the sink returns). Four-phase return-to-zero, dual-rail, no clock.
// Timing: a token needs STAGES stage delays from in to out; being half
// buffers, the stages hold at most STAGES/2 distinct tokens at once
// (alternating with spacers).
// The 4-bit width follows the target circuits; the number of stages is this
// implementation's choice.
module qdi_fifo
  import qdi_pkg::*;
#(
  parameter int unsigned WIDTH  = qdi_pkg::DATA_W,
  parameter int unsigned STAGES = 4
) (
  input  logic             rst,
  input  dr_t  [WIDTH-1:0] in,
  output logic             in_ack,
  output dr_t  [WIDTH-1:0] out,
  input  logic             out_ack
);

  dr_t  [WIDTH-1:0] data [STAGES+1];
  logic             ack  [STAGES+1];

  assign data[0]      = in;
  assign in_ack       = ack[0];
  assign out          = data[STAGES];
  assign ack[STAGES]  = out_ack;

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    theta_reg #(.N(WIDTH)) u_reg (
      .rst     (rst),
      .in      (data[s]),
      .ack_out (ack[s]),
      .out     (data[s+1]),
      .ack_in  (ack[s+1])
    );
  end

endmodule
