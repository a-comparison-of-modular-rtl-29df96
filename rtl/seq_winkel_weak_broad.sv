`timescale 1ns / 1ps
// Flat 4-phase sequencer with weak-broad work release.
//
// One step of a cyclic control loop. The work request rises when the input
// request is high and the output acknowledge is low, so a slow return to
// zero of the previous cycle cannot deadlock a loop. The input acknowledge
// is the work acknowledge. The output request rises as soon as the work
// request has fallen (weak-broad release: the work acknowledge may still be
// high) and falls when the next step has acknowledged and the input request
// is low.
//
// Circuit: s = C(in_req, ~out_ack) with master clear;
// wk_req = in_req & ~out_ack; in_ack = wk_ack; out_req = s & ~wk_req.
// Because the work acknowledge may still be high when the next step starts,
// shared resources behind this sequencer need the weak-broad call element.
//
// Interface: input, work and output 4-phase request/acknowledge pairs and
// an active-low master clear. Timing: no clock.
//
// The C-element's output feeds back through the handshake to its own
// inputs, which simulators report as a combinational loop; this feedback is
// the sequencer's state and is intended.
module seq_winkel_weak_broad (
  input  logic mc_n,
  input  logic in_req,
  output logic in_ack,
  output logic wk_req,
  input  logic wk_ack,
  output logic out_req,
  input  logic out_ack
);

  logic s;

  c_element #(.N(2)) u_s (
    .mc_n (mc_n),
    .in   ({in_req, ~out_ack}),
    .out  (s)
  );

  assign wk_req  = in_req & ~out_ack;
  assign in_ack  = wk_ack;
  assign out_req = s & ~wk_req;

endmodule
