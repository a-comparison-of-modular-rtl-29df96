`timescale 1ns / 1ps
// Flat 4-phase sequencer with broad work release.
//
// One step of a cyclic (state-machine) control loop. The work request
// follows the input request. The input acknowledge is the work acknowledge,
// so the previous step is acknowledged as soon as this step's work is done.
// The output request rises only after the work handshake has fully
// returned to zero and the input handshake with it (broad release); it
// falls once the next step has acknowledged and the input request is low.
//
// Circuit: s = C(in_req, ~out_ack) with master clear;
// wk_req = in_req; in_ack = wk_ack; out_req = s & ~wk_req & ~wk_ack.
// Requirement on the environment: no new input request before the output
// acknowledge has risen, which holds in loops of two or more steps.
//
// Interface: input, work and output 4-phase request/acknowledge pairs and
// an active-low master clear. Timing: no clock.
//
// The C-element's output feeds back through the handshake to its own
// inputs, which simulators report as a combinational loop; this feedback is
// the sequencer's state and is intended.
module seq_winkel_broad (
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

  assign wk_req  = in_req;
  assign in_ack  = wk_ack;
  assign out_req = s & ~wk_req & ~wk_ack;

endmodule
