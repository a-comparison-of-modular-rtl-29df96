`timescale 1ns / 1ps
// 4-phase call element for broad work release.
//
// Gives N clients, one at a time, access to a shared resource (a register
// load, the ALU, a subsequence) and routes the resource's acknowledge back
// to the client that asked. The resource request is the OR of the client
// requests; each client acknowledge is a C-element of that client's
// request and the resource acknowledge, so it rises only for the client
// whose request is high and falls once both have returned to zero.
//
// Requirement on the clients: a new request arrives only after any earlier
// request and its acknowledge have both fallen, which broad-release
// sequencers guarantee. Concurrent requests are not allowed.
//
// Interface: req[i]/ack[i] are the client handshakes, rs/as the resource
// handshake; mc_n clears the acknowledges. N defaults to the two clients
// drawn for the element; the same structure extends to more clients.
// Timing: no clock.
module call_broad_4ph #(
  parameter int unsigned N = 2
) (
  input  logic         mc_n,
  input  logic [N-1:0] req,
  output logic [N-1:0] ack,
  output logic         rs,
  input  logic         as
);

  assign rs = |req;

  for (genvar i = 0; i < N; i++) begin : g_client
    c_element #(.N(2)) u_ack (
      .mc_n (mc_n),
      .in   ({req[i], as}),
      .out  (ack[i])
    );
  end

endmodule
