`timescale 1ns / 1ps
// 2-phase handshake control for the same state-machine segment.
//
// The segment of ctrl_seg_4ph in transition signalling, where sequencing
// needs no hardware: the acknowledge event of one unit of work is the
// request event of the next.
//
//   r1 -> AC -> MB -> fork: { write memory } ||
//                           { AC+1 -> AC, select on CARRYOUT:
//                             true -> merge, false -> complement LINK -> merge }
//   join (C-element) -> select on SKIP: false -> merge,
//                                       true  -> PC+1 -> PC -> merge
//   merge -> r4, the request to step F -> IX
//
// A merge of two mutually exclusive paths is an exclusive-or; the join of
// the two parallel paths is a C-element; the selects are state-holding
// 2-phase selects that read their condition at the request event.
//
// Interface: r1 the transition that starts the segment; *_req/*_ack the
// transition handshakes of the units of work; r4 the transition that
// requests the F -> IX step; skip and carryout the branch conditions; mc_n
// the active-low master clear (all wires start low). Timing: no clock.
//
// Every request event returns as an acknowledge event through wires,
// selects and C-elements with no register in the ring, so simulators report
// combinational loops through the selects and the join. These rings are how
// a self-timed controller works and are intended; each is broken in time by
// the matched delay of the work it waits for.
module ctrl_seg_2ph (
  input  logic mc_n,
  input  logic r1,
  output logic r4,
  input  logic skip,
  input  logic carryout,
  output logic mb_req,   // AC -> MB
  input  logic mb_ack,
  output logic mem_req,  // write memory
  input  logic mem_ack,
  output logic inc_req,  // AC + 1 -> AC
  input  logic inc_ack,
  output logic cpl_req,  // complement LINK
  input  logic cpl_ack,
  output logic pc_req,   // PC + 1 -> PC
  input  logic pc_ack
);

  logic cy_t, cy_merged, a2;
  logic sk_f;

  assign mb_req  = r1;
  assign mem_req = mb_ack;   // fork
  assign inc_req = mb_ack;

  select_2ph u_sel_carry (
    .mc_n, .in_req(inc_ack), .cond(carryout), .t_req(cy_t), .f_req(cpl_req)
  );

  assign cy_merged = cy_t ^ cpl_ack;

  c_element #(.N(2)) u_join (
    .mc_n, .in({mem_ack, cy_merged}), .out(a2)
  );

  select_2ph u_sel_skip (
    .mc_n, .in_req(a2), .cond(skip), .t_req(pc_req), .f_req(sk_f)
  );

  assign r4 = sk_f ^ pc_ack;

endmodule
