// dims_adder: unsigned dual-rail ripple-carry adder of DIMS half and full
// adders.
//
// sum = a + b with a of WA bits and b of WB bits (WB <= WA). Bit 0 is a half
// adder, bits 1..WB-1 full adders, bits WB..WA-1 half adders that add the
// carry, and the last carry is the top sum bit (WA+1 bits in all). Every cell
// is a dims_gate, so the adder is strongly indicating.
// Interface: rst, a[WA-1:0], b[WB-1:0], sum[WA:0], all dual-rail. No clock;
// a result settles after the carry has rippled through.
// The adders of the multiplier are not detailed beyond their DIMS
// construction; the ripple-carry form is this implementation's choice.
// Circular-logic warnings here come from the C-element latches of the cells
// and the handshake loops of the pipeline around them; they are intended.
module dims_adder
  import qdi_pkg::*;
#(
  parameter int unsigned WA = 4,
  parameter int unsigned WB = 4
) (
  input  logic          rst,
  input  dr_t  [WA-1:0] a,
  input  dr_t  [WB-1:0] b,
  output dr_t  [WA:0]   sum
);

  // Truth tables, output 0 = sum, output 1 = carry.
  // Half adder, minterm {x1, x0}: sum = x0 ^ x1, carry = x0 & x1.
  localparam logic [7:0]  HA_TT = {4'b1000, 4'b0110};
  // Full adder, minterm {x2, x1, x0}: sum = parity, carry = majority.
  localparam logic [15:0] FA_TT = {8'b1110_1000, 8'b1001_0110};

  dr_t [WA-1:0] carry;   // carry[i] is the carry out of bit i

  for (genvar i = 0; i < WA; i++) begin : g_bit
    if (i == 0) begin : g_ha0
      dims_gate #(.NIN(2), .NOUT(2), .TT(HA_TT)) u_ha (
        .rst (rst),
        .in  ({b[0], a[0]}),
        .out ({carry[0], sum[0]})
      );
    end else if (i < WB) begin : g_fa
      dims_gate #(.NIN(3), .NOUT(2), .TT(FA_TT)) u_fa (
        .rst (rst),
        .in  ({carry[i-1], b[i], a[i]}),
        .out ({carry[i], sum[i]})
      );
    end else begin : g_ha
      dims_gate #(.NIN(2), .NOUT(2), .TT(HA_TT)) u_ha (
        .rst (rst),
        .in  ({carry[i-1], a[i]}),
        .out ({carry[i], sum[i]})
      );
    end
  end

  assign sum[WA] = carry[WA-1];

endmodule
