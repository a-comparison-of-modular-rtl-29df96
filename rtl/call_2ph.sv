`timescale 1ns / 1ps
// 2-phase (transition-signalling) call element for two clients.
//
// Every transition on a request or acknowledge wire is one event. A
// transition on either client request produces a transition on the
// resource request (an exclusive-or). The resource acknowledge is routed
// to the client that called: client 1's acknowledge is a C-element of its
// request and (resource acknowledge xor client 2's request), and
// symmetrically for client 2, so only the client whose request is ahead of
// its acknowledge sees the new event.
//
// Interface: r1/a1 and r2/a2 client transition handshakes, rs/as resource
// transition handshake, active-low master clear (all wires start low).
// Timing: no clock. A client calls only after its previous call has been
// acknowledged, and the two clients do not call at the same time.
module call_2ph (
  input  logic mc_n,
  input  logic r1,
  output logic a1,
  input  logic r2,
  output logic a2,
  output logic rs,
  input  logic as
);

  assign rs = r1 ^ r2;

  c_element #(.N(2)) u_a1 (
    .mc_n (mc_n),
    .in   ({r1, as ^ r2}),
    .out  (a1)
  );

  c_element #(.N(2)) u_a2 (
    .mc_n (mc_n),
    .in   ({as ^ r1, r2}),
    .out  (a2)
  );

endmodule
