// qdi_pkg: types and constants shared by the dual-rail, four-phase (QDI)
// multiplier and its pipeline buffers.
//
// Every channel in this design is a dual-rail word: for each bit one "t" rail
// and one "f" rail.  t=1,f=0 is a logic one (HI), t=0,f=1 a logic zero (LO),
// both low is the spacer ("null"), and both high is an illegal code word.
// A channel carries alternately a data token and a spacer; the receiver
// raises its acknowledge after it has captured a complete data token and
// lowers it after it has captured the spacer (four-phase, return-to-zero).
//
// buf_style_e selects how the storage element of every pipeline buffer is
// built.  The five styles are the buffer styles compared in the fault
// injection study this design follows; the doubled-up double-checking WCHB
// has a duplicated channel and is a separate module (buf_dd_wchb).
package qdi_pkg;

  typedef enum logic [2:0] {
    BUF_WCHB         = 3'd0,  // weak-conditioned half buffer
    BUF_INTERLOCKING = 3'd1,  // WCHB, a rail cannot rise while the other is high
    BUF_DEADLOCKING  = 3'd2,  // WCHB, a rail cannot fall while the other is high
    BUF_DUALCD       = 3'd3,  // WCHB opened only by a complete input word
    BUF_MTD          = 3'd4   // Mousetrap-style D-latch half buffer
  } buf_style_e;

  // Operand width the study uses for its main (largest) configuration.
  localparam int unsigned MUL_WIDTH = 8;

endpackage
