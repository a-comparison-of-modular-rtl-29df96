`timescale 1ns / 1ps
// 4-phase sequencer step of a selectable style.
//
// A thin wrapper that places one of the four sequencers (flat broad, flat
// weak-broad, flat narrow release, or the hierarchical van Berkel
// S-element sequencer) so that a control segment can be built in any
// style from one description. Ports and timing are those of the chosen
// sequencer; only the hierarchical one holds its input acknowledge back
// until every later step of the sequence is done.
module seq_step
  import selftimed_pkg::*;
#(
  parameter seq_style_e STYLE = SEQ_BROAD
) (
  input  logic mc_n,
  input  logic in_req,
  output logic in_ack,
  output logic wk_req,
  input  logic wk_ack,
  output logic out_req,
  input  logic out_ack
);

  if (STYLE == SEQ_HIER) begin : g_hier
    seq_vanberkel u_seq (.*);
  end else if (STYLE == SEQ_NARROW) begin : g_narrow
    seq_winkel_narrow u_seq (.*);
  end else if (STYLE == SEQ_WEAK_BROAD) begin : g_weak_broad
    seq_winkel_weak_broad u_seq (.*);
  end else begin : g_broad
    seq_winkel_broad u_seq (.*);
  end

endmodule
