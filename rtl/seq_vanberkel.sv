`timescale 1ns / 1ps
// Hierarchical 4-phase sequencer built around the van Berkel S-element.
//
// One step of a nested sequence. An input request starts the step's work;
// when the work has been acknowledged and fully returned to zero (broad
// release) the output request starts the next step. The input acknowledge
// is the output acknowledge passed straight back, so the step acknowledges
// only when it and every later step of its sequence are done, and it
// returns to zero only when all of them have returned to zero. The flat
// sequencers use this element for sequences nested inside one unit of work.
//
// Circuit: s = C(in_req, wk_ack); wk_req = in_req & ~s;
// out_req = s & ~wk_ack; in_ack = out_ack.
// The master clear on the C-element is this design's addition; it gives
// the state-holding node a defined value at start-up.
//
// Interface: three 4-phase request/acknowledge pairs (input, work, output)
// and an active-low master clear. Timing: no clock; every output follows
// its inputs through one gate level plus the C-element.
//
// The C-element's output feeds back into its own inputs' gating through the
// work handshake, which simulators report as a combinational loop; this
// feedback is the sequencer's state and is intended.
module seq_vanberkel (
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
    .in   ({in_req, wk_ack}),
    .out  (s)
  );

  assign wk_req  = in_req & ~s;
  assign out_req = s & ~wk_ack;
  assign in_ack  = out_ack;

endmodule
