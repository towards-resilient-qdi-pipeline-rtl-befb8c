// input_interlock: SR latch that arbitrates between the two rails of one
// dual-rail input (the input interlock of the theta buffer).
//
// It behaves as two cross-coupled NAND gates, each taking its own rail and
// the other gate's output: with both rails low nothing is granted; the first
// rail to rise is granted (its active-low output goes low) and, through the
// cross coupling, keeps the companion rail from being granted, so a later
// rise of the companion rail, e.g. from a transient fault, is not passed on.
// A grant is held while its rail stays high; when the granted rail falls
// and the companion rail is still high, the companion is granted. This is
// the core of the classical mutex without its metastability filter.
// The latch is written as one state-holding process rather than two gates
// in a loop. A simultaneous rise of both rails, which in silicon ends in a
// metastable state that resolves either way, is thereby resolved in favour
// of the true rail in one step instead of oscillating in a zero-delay
// simulator. For rails that rise one after the other the behaviour is that
// of the NAND pair.
// Interface: in_t, in_f (input rails); grant_t_n, grant_f_n (active-low
// grants, called Int.T/Int.F in the buffer). Timing: no clock; the grant
// follows the rails after the latch delay.
module input_interlock (
  input  logic in_t,
  input  logic in_f,
  output logic grant_t_n,
  output logic grant_f_n
);

  logic own_t, own_f;   // latch state: which rail holds the grant

  always_latch begin
    if (!in_t) own_t = 1'b0;
    if (!in_f) own_f = 1'b0;
    if (in_t && !own_f) own_t = 1'b1;
    if (in_f && !own_t) own_f = 1'b1;
  end

  assign grant_t_n = ~own_t;
  assign grant_f_n = ~own_f;

endmodule
