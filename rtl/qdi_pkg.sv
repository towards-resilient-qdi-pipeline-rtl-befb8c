// qdi_pkg: shared types and constants of the dual-rail QDI pipelines.
//
// A data bit travels on two rails (t, f). (1,0) is a logical 1, (0,1) a
// logical 0, (0,0) the spacer that separates tokens in the four-phase
// return-to-zero protocol, and (1,1) is illegal. The helper functions are
// used by the function blocks and by the testbenches to build and read
// dual-rail words. The 4-bit data width is the one the target circuits use;
// everything else here is a convenience of this implementation.
package qdi_pkg;

  // Data width of both target circuits (FIFO and multiplier operands).
  localparam int unsigned DATA_W = 4;

  // One dual-rail bit.
  typedef struct packed {
    logic t;
    logic f;
  } dr_t;

  localparam dr_t DR_SPACER = '{t: 1'b0, f: 1'b0};

  // Token carrying the value v.
  function automatic dr_t dr_token(input logic v);
    return '{t: v, f: ~v};
  endfunction

  function automatic logic dr_is_spacer(input dr_t d);
    return ~d.t & ~d.f;
  endfunction

  function automatic logic dr_is_valid(input dr_t d);
    return d.t ^ d.f;
  endfunction

  function automatic logic dr_is_illegal(input dr_t d);
    return d.t & d.f;
  endfunction

endpackage
