`timescale 1ns / 1ps
// Flat 4-phase sequencer with narrow work release.
//
// One step of a cyclic control loop. The work request rises when the input
// request is high and the output acknowledge is low, and falls with the
// input request. The input acknowledge is the work acknowledge. The output
// request rises as soon as the work is acknowledged (narrow release), while
// the work handshake is still returning to zero, so the next step overlaps
// this step's restoration. It falls once the next step has acknowledged and
// the input request is low.
//
// Circuit: wk_req = AC(common in_req; plus ~out_ack);
// s = C(in_req, ~out_ack); out_req = AC(common s; plus wk_ack);
// in_ack = wk_ack. AC is an asymmetric C-element whose plus inputs gate
// only the rising edge. Which input of each asymmetric element is the
// plus input is this design's reading of the stated conditions (work
// request rises on input request with output acknowledge low; output
// request rises on work acknowledge with output acknowledge low).
// Shared resources behind this sequencer need the narrow call element, and
// select conditions read by later steps need latched selects.
//
// Interface: input, work and output 4-phase request/acknowledge pairs and
// an active-low master clear. Timing: no clock.
//
// The C-element outputs feed back through the handshake to their own
// inputs, which simulators report as combinational loops; this feedback is
// the sequencer's state and is intended.
module seq_winkel_narrow (
  input  logic mc_n,
  input  logic in_req,
  output logic in_ack,
  output logic wk_req,
  input  logic wk_ack,
  output logic out_req,
  input  logic out_ack
);

  logic s;

  asym_c_element #(.NC(1), .NP(1)) u_wr (
    .mc_n   (mc_n),
    .common (in_req),
    .plus   (~out_ack),
    .out    (wk_req)
  );

  c_element #(.N(2)) u_s (
    .mc_n (mc_n),
    .in   ({in_req, ~out_ack}),
    .out  (s)
  );

  asym_c_element #(.NC(1), .NP(1)) u_or (
    .mc_n   (mc_n),
    .common (s),
    .plus   (wk_ack),
    .out    (out_req)
  );

  assign in_ack = wk_ack;

endmodule
