`timescale 1ns / 1ps
// Shared constants and types for the self-timed handshake control library.
//
// The library builds control for a small register datapath out of
// request/acknowledge handshake elements instead of a global state machine.
// This package holds what several modules share: the data word width (the
// 12-bit word of the PDP-8 processor that the control segments act on) and
// the enumeration that selects the work-release style of the flat 4-phase
// sequencers (or the hierarchical alternative).
package selftimed_pkg;

  // Data word width of the register datapath (PDP-8 word).
  localparam int unsigned WORD_W = 12;

  // Work-release style of a flat 4-phase sequencer and of its matching
  // call element:
  //   SEQ_BROAD      next step starts after work request and acknowledge are both low
  //   SEQ_WEAK_BROAD next step starts when the work request falls
  //   SEQ_NARROW     next step starts when the work acknowledge rises
  //   SEQ_HIER       hierarchical: every step is a van Berkel S-element
  //                  sequencer (broad release), and a step acknowledges only
  //                  when it and every later step are done
  typedef enum logic [1:0] {
    SEQ_BROAD      = 2'd0,
    SEQ_WEAK_BROAD = 2'd1,
    SEQ_NARROW     = 2'd2,
    SEQ_HIER       = 2'd3
  } seq_style_e;

endpackage
