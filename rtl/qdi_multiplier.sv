// qdi_multiplier: pipelined dual-rail 4 x 4 unsigned multiplier built from
// theta_reg stages and DIMS logic.
//
// The product is formed by plain shift-and-add: partial product k is
// a & {W{b[k]}} (DIMS AND gates) and is added at weight 2**k. The pipeline
// has W+1 stages:
//   stage 0      holds the operands a, b;
//   stage k+1    (k = 0 .. W-2) holds a, b and the accumulated sum of the
//                partial products 0..k;
//   stage W      holds the 2W-bit product.
// Between stage k and k+1 sit the AND gates of partial product k and, for
// k >= 1, a dims_adder that adds it to the upper bits of the accumulated sum
// (the lower k bits are final and are passed straight on). The operands are
// carried from stage to stage, so an operand bit runs directly from one
// buffer to the next, next to the logic that reads it. Each stage
// acknowledges its predecessor through its completion detector.
// Interface: rst; a, b (dual-rail operands) and in_ack towards the source;
// p (dual-rail product) and out_ack towards the sink. Four-phase RTZ.
// Timing: latency of W+1 stages plus the logic between them; a new operand
// pair can enter every handshake cycle of the slowest stage.
// The 4-bit operands, binary shift-and-add and pipelining follow the target
// circuit; the stage split, ripple-carry adders and accumulator widths are
// this implementation's choices.
module qdi_multiplier
  import qdi_pkg::*;
#(
  parameter int unsigned W = qdi_pkg::DATA_W
) (
  input  logic           rst,
  input  dr_t  [W-1:0]   a,
  input  dr_t  [W-1:0]   b,
  output logic           in_ack,
  output dr_t  [2*W-1:0] p,
  input  logic           out_ack
);

  // Width of the accumulated sum after partial products 0..k have been added.
  function automatic int unsigned acc_w(input int unsigned k);
    return (k == 0) ? W : W + k + 1;
  endfunction

  // Operand stage.
  dr_t [W-1:0] a_q [W];   // operands held by stages 0 .. W-1
  dr_t [W-1:0] b_q [W];
  logic        ack [W+1]; // ack[s] is the ack_out of stage s

  assign in_ack = ack[0];

  theta_reg #(.N(2*W)) u_stage0 (
    .rst     (rst),
    .in      ({b, a}),
    .ack_out (ack[0]),
    .out     ({b_q[0], a_q[0]}),
    .ack_in  (ack[1])
  );

  for (genvar k = 0; k < W; k++) begin : g_step
    localparam int unsigned AWN = acc_w(k);   // accumulator width after this step
    dr_t [W-1:0]   pp;                       // partial product k
    dr_t [AWN-1:0] acc_d;                    // accumulator entering stage k+1
    dr_t [AWN-1:0] acc_q;                    // accumulator held by stage k+1

    for (genvar i = 0; i < W; i++) begin : g_and
      dims_gate #(.NIN(2), .NOUT(1), .TT(4'b1000)) u_and (
        .rst (rst),
        .in  ({b_q[k][k], a_q[k][i]}),
        .out (pp[i:i])
      );
    end

    if (k == 0) begin : g_first
      assign acc_d = pp;
    end else begin : g_add
      localparam int unsigned AWP = acc_w(k-1);
      if (k > 0) begin : g_low
        assign acc_d[k-1:0] = g_step[k-1].acc_q[k-1:0];
      end
      dims_adder #(.WA(W), .WB(AWP-k)) u_add (
        .rst (rst),
        .a   (pp),
        .b   (g_step[k-1].acc_q[AWP-1:k]),
        .sum (acc_d[AWN-1:k])
      );
    end

    if (k < W-1) begin : g_mid
      theta_reg #(.N(2*W + AWN)) u_stage (
        .rst     (rst),
        .in      ({b_q[k], a_q[k], acc_d}),
        .ack_out (ack[k+1]),
        .out     ({b_q[k+1], a_q[k+1], acc_q}),
        .ack_in  (ack[k+2])
      );
    end else begin : g_last
      theta_reg #(.N(AWN)) u_stage (
        .rst     (rst),
        .in      (acc_d),
        .ack_out (ack[k+1]),
        .out     (acc_q),
        .ack_in  (out_ack)
      );
      assign p = acc_q;
    end
  end

endmodule
