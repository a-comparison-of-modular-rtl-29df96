`timescale 1ns / 1ps
// 4-phase handshake control for a typical state-machine segment.
//
// Four sequencer steps in a row, showing sequencing, a parallel fork
// and join, a nested (hierarchical) sequence, two conditional branches and
// a merge through a call element:
//
//   step 1  AC -> MB
//   step 2  fork: { write memory } || { nested: AC+1 -> AC, then
//                   if not CARRYOUT: complement LINK }; join (C-element)
//   select on SKIP: true -> step 3 (PC+1 -> PC); false -> straight on
//   merge of both paths (call element)
//   step 4  F -> IX (work brought out on wr4/wa4), then out to the next step
//
// The nested sequence inside step 2 uses the hierarchical van Berkel
// sequencer, whose input acknowledge waits for the whole nested sequence;
// the true branch of the CARRYOUT select acknowledges itself at once. The
// top-level steps use the sequencer of style STYLE, and the merge uses
// the call element that matches it (broad, weak-broad or narrow). The
// default, STYLE = SEQ_BROAD, is the flat broad form; weak-broad and narrow
// are the same segment with faster work release. SEQ_HIER builds every
// step from van Berkel sequencers with the broad call: the segment is then
// one nested sequence, and ia1 rises only after the output handshake
// or4/oa4 has completed, so the environment must answer or4 before it can
// see ia1. LATCH_SELECTS makes both selects latch their condition while
// their request is high; by default it is set for the narrow and the
// hierarchical styles, where requests linger longest.
//
// Interface: ir1/ia1 start the segment; or4/oa4 pass control on. Each unit
// of work is a 4-phase request/acknowledge pair to the datapath or to the
// memory; skip and carryout are the branch conditions; mc_n is the
// active-low master clear. Timing: no clock; every step advances on its
// work acknowledge.
//
// Every request travels round a handshake ring (request, work, acknowledge,
// return to zero) with no register in it, so simulators report
// combinational loops through the sequencers, selects and joins. These
// rings are how a self-timed controller works and are intended; each is
// broken in time by the matched delay of the work it waits for.
module ctrl_seg_4ph
  import selftimed_pkg::*;
#(
  parameter seq_style_e STYLE         = SEQ_BROAD,
  parameter bit         LATCH_SELECTS = (STYLE == SEQ_NARROW || STYLE == SEQ_HIER)
) (
  input  logic mc_n,
  // sequence in / out
  input  logic ir1,
  output logic ia1,
  output logic or4,
  input  logic oa4,
  // branch conditions
  input  logic skip,
  input  logic carryout,
  // units of work
  output logic wr1,      // AC -> MB
  input  logic wa1,
  output logic mem_req,  // write memory
  input  logic mem_ack,
  output logic wr2a,     // AC + 1 -> AC
  input  logic wa2a,
  output logic cpl_req,  // complement LINK
  input  logic cpl_ack,
  output logic wr3,      // PC + 1 -> PC
  input  logic wa3,
  output logic wr4,      // F -> IX
  input  logic wa4
);

  logic s1_or, s1_oa;
  logic wr2, wa2, s2_or, s2_oa;
  logic vb_ia, vb_or, vb_oa;
  logic cy_t_req;
  logic sk_t_req, sk_t_ack;
  logic [1:0] call_req, call_ack;
  logic s4_ir, s4_ia;

  // step 1: AC -> MB
  seq_step #(.STYLE(STYLE)) u_seq1 (
    .mc_n, .in_req(ir1), .in_ack(ia1), .wk_req(wr1), .wk_ack(wa1),
    .out_req(s1_or), .out_ack(s1_oa)
  );

  // step 2: parallel memory write and nested increment sequence
  seq_step #(.STYLE(STYLE)) u_seq2 (
    .mc_n, .in_req(s1_or), .in_ack(s1_oa), .wk_req(wr2), .wk_ack(wa2),
    .out_req(s2_or), .out_ack(s2_oa)
  );

  assign mem_req = wr2;   // fork

  seq_vanberkel u_seq2a (
    .mc_n, .in_req(wr2), .in_ack(vb_ia), .wk_req(wr2a), .wk_ack(wa2a),
    .out_req(vb_or), .out_ack(vb_oa)
  );

  select_4ph #(.LATCHED(LATCH_SELECTS)) u_sel_carry (
    .in_req(vb_or), .in_ack(vb_oa), .cond(carryout),
    .t_req(cy_t_req), .t_ack(cy_t_req),
    .f_req(cpl_req), .f_ack(cpl_ack)
  );

  c_element #(.N(2)) u_join (
    .mc_n, .in({mem_ack, vb_ia}), .out(wa2)
  );

  // SKIP branch: true -> step 3, false -> merge directly
  select_4ph #(.LATCHED(LATCH_SELECTS)) u_sel_skip (
    .in_req(s2_or), .in_ack(s2_oa), .cond(skip),
    .t_req(sk_t_req), .t_ack(sk_t_ack),
    .f_req(call_req[0]), .f_ack(call_ack[0])
  );

  // step 3: PC + 1 -> PC
  seq_step #(.STYLE(STYLE)) u_seq3 (
    .mc_n, .in_req(sk_t_req), .in_ack(sk_t_ack), .wk_req(wr3), .wk_ack(wa3),
    .out_req(call_req[1]), .out_ack(call_ack[1])
  );

  // merge of the two paths
  if (STYLE == SEQ_NARROW) begin : g_call_narrow
    call_narrow_4ph #(.N(2)) u_merge (
      .mc_n, .req(call_req), .ack(call_ack), .rs(s4_ir), .as(s4_ia)
    );
  end else if (STYLE == SEQ_WEAK_BROAD) begin : g_call_weak_broad
    call_weak_broad_4ph #(.N(2)) u_merge (
      .mc_n, .req(call_req), .ack(call_ack), .rs(s4_ir), .as(s4_ia)
    );
  end else begin : g_call_broad
    call_broad_4ph #(.N(2)) u_merge (
      .mc_n, .req(call_req), .ack(call_ack), .rs(s4_ir), .as(s4_ia)
    );
  end

  // step 4: F -> IX
  seq_step #(.STYLE(STYLE)) u_seq4 (
    .mc_n, .in_req(s4_ir), .in_ack(s4_ia), .wk_req(wr4), .wk_ack(wa4),
    .out_req(or4), .out_ack(oa4)
  );

endmodule
