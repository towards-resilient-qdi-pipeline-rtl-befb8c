// theta_bit: one dual-rail bit of the input/output-interlocking WCHB with SR
// latches (IOISRWCHB, the resilient buffer style "theta").
//
// Structure, per rail r in {t, f}:
//   * input interlock: the two rails meet in a cross-coupled NAND SR latch
//     (input_interlock). The first rail to rise gets an active-low grant and
//     locks the companion rail out, so a second rising rail (an illegal (1,1)
//     code word, e.g. from a transient) is not passed on.
//   * output filter: int_in_r = NOR(grant_r_n, out_other). It combines the
//     input grant with the state of the other rail's output; the two NORs,
//     closed through the output C-elements, form the second SR latch that
//     interlocks the outputs. A rail can only be armed while the other output
//     is low.
//   * output C-element+: out_r = C+(in_r, en ; pos = int_in_r). The direct
//     rail and the enable decide both transitions; the filtered copy
//     int_in_r is the positive input and must agree before an up-transition.
//     A short pulse on in_r that is gone before it has passed NAND + NOR
//     does not reach the positive input in time, which is the glitch filter.
//     The RTL carries no gate delays; this filtering exists only once the
//     gates are mapped to cells with real delays.
// en is the stage enable (the inverted acknowledge of the successor). A token
// is captured while en = 1, the spacer while en = 0.
// Interface: rst, in (dual-rail input), en, out (dual-rail output).
// Timing: no clock; four-phase return-to-zero handshake.
// Following the buffer description: the NAND input interlock, the NOR arming
// gate and the C-element+ outputs. Which output the NOR takes as "output
// state" (the other rail's output) is this implementation's reading, and so
// is keeping the plain WCHB's enable (inverted acknowledge) for this style.
// The combinational loop reported through out_t -> int_in_f -> out_f ->
// int_in_t is the output interlock itself and is intended.
module theta_bit
  import qdi_pkg::*;
(
  input  logic rst,
  input  dr_t  in,
  input  logic en,
  output dr_t  out
);

  logic grant_t_n, grant_f_n;   // input interlock outputs (Int.T, Int.F)
  logic int_in_t, int_in_f;     // armed, filtered rails (IntIn.T, IntIn.F)

  input_interlock u_ilock (
    .in_t      (in.t),
    .in_f      (in.f),
    .grant_t_n (grant_t_n),
    .grant_f_n (grant_f_n)
  );

  assign int_in_t = ~(grant_t_n | out.f);
  assign int_in_f = ~(grant_f_n | out.t);

  c_element_plus #(.N(2)) u_c_t (
    .rst (rst),
    .in  ({in.t, en}),
    .pos (int_in_t),
    .out (out.t)
  );

  c_element_plus #(.N(2)) u_c_f (
    .rst (rst),
    .in  ({in.f, en}),
    .pos (int_in_f),
    .out (out.f)
  );

endmodule
