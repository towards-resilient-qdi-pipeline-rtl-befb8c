// dims_gate: dual-rail function block in Delay-Insensitive Minterm Synthesis.
//
// For NIN dual-rail inputs there is one NIN-input C-element per minterm;
// minterm m takes the true rail of input i where bit i of m is 1 and the
// false rail otherwise, so exactly one minterm fires per input token and all
// return to 0 with the spacer. Output j is the OR of the minterms for which
// the truth table TT has a 1 (true rail) or a 0 (false rail). The block is
// strongly indicating: outputs become valid only after all inputs are valid
// and return to the spacer only after all inputs have.
// TT holds NOUT truth tables of 2**NIN entries each; output j uses bits
// [j*2**NIN +: 2**NIN], entry m being the output for input value m
// (input 0 is the least significant bit of m). The default is the 2-input
// AND gate.
// Interface: rst, in[NIN-1:0], out[NOUT-1:0], all dual-rail. No clock.
// The DIMS AND gate is the form the function units follow; the generic
// truth-table parameter is this implementation's way of writing all of them.
// Circular-logic warnings on the minterms come from the C-element latches and
// the pipeline handshake loops they sit in; they are intended.
module dims_gate
  import qdi_pkg::*;
#(
  parameter int unsigned NIN  = 2,
  parameter int unsigned NOUT = 1,
  parameter logic [NOUT*(2**NIN)-1:0] TT = 4'b1000
) (
  input  logic            rst,
  input  dr_t  [NIN-1:0]  in,
  output dr_t  [NOUT-1:0] out
);

  localparam int unsigned NM = 2**NIN;

  logic [NM-1:0] minterm;

  for (genvar m = 0; m < NM; m++) begin : g_min
    logic [NIN-1:0] sel;
    always_comb begin
      for (int i = 0; i < NIN; i++)
        sel[i] = ((m >> i) & 1) != 0 ? in[i].t : in[i].f;
    end
    c_element #(.N(NIN)) u_c (
      .rst (rst),
      .in  (sel),
      .out (minterm[m])
    );
  end

  always_comb begin
    for (int j = 0; j < NOUT; j++) begin
      out[j].t = |(minterm &  TT[j*NM +: NM]);
      out[j].f = |(minterm & ~TT[j*NM +: NM]);
    end
  end

endmodule
