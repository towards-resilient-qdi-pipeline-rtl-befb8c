// theta_reg: N-bit WCHB pipeline stage built from theta_bit buffers.
//
// All bits share one enable, the inverted acknowledge from the successor
// (en = ~ack_in). A completion detector over the stage outputs produces
// ack_out for the predecessor: it rises once every output bit holds a token
// and falls once every output bit has returned to the spacer.
// Interface: rst, in[N-1:0] (dual-rail), ack_out (to the predecessor),
// out[N-1:0] (dual-rail), ack_in (from the successor).
// Timing: four-phase return-to-zero handshake, one half buffer: a stage holds
// either a token or a spacer.
// The enable as inverted acknowledge and the OR completion detector follow
// the WCHB pipeline described; using them unchanged around the theta bits is
// this implementation's reading.
// ack_out feeds the enable of the predecessor, whose outputs feed this stage:
// the handshake loop that lint reports as circular logic is the intended
// control loop of the asynchronous pipeline.
module theta_reg
  import qdi_pkg::*;
#(
  parameter int unsigned N = qdi_pkg::DATA_W
) (
  input  logic         rst,
  input  dr_t  [N-1:0] in,
  output logic         ack_out,
  output dr_t  [N-1:0] out,
  input  logic         ack_in
);

  logic en;

  assign en = ~ack_in;

  for (genvar i = 0; i < N; i++) begin : g_bit
    theta_bit u_bit (
      .rst (rst),
      .in  (in[i]),
      .en  (en),
      .out (out[i])
    );
  end

  completion_detect #(.N(N)) u_cd (
    .rst  (rst),
    .data (out),
    .done (ack_out)
  );

endmodule
