// ptb_pkg: types and helper functions shared by the product-term programmable
// logic core (PLC).
//
// seq_mode_e selects how the core supports sequential circuits. The two
// methods are the ones the architecture proposes: a dual network, where every
// PTB output has a flip-flop whose output reaches every interconnect switch
// while the unregistered output reaches only later levels, and a decoupled
// global register array whose register inputs are chosen from PTB outputs.
// SEQ_NONE (purely combinational fabric) is this design's own addition for
// experiments.
//
// Interconnect multiplexer encoding (this design's choice): a select code of 0
// drives a constant 0, code s in 1..N drives source s-1. An all-zero
// configuration therefore makes every multiplexer output 0.
package ptb_pkg;

  // Upper bound on the number of logic levels of a core (sizes the per-level
  // PTB count parameter of ptb_plc).
  localparam int unsigned MAX_LEVELS = 8;

  typedef enum logic [1:0] {
    SEQ_NONE      = 2'd0,
    SEQ_DUAL      = 2'd1,
    SEQ_DECOUPLED = 2'd2
  } seq_mode_e;

  // Width of a multiplexer select field for n sources plus the constant-0 code.
  function automatic int unsigned sel_width(int unsigned n);
    return (n < 1) ? 1 : $clog2(n + 1);
  endfunction

endpackage
