`timescale 1ns / 1ps
// 4-phase call element for weak-broad work release.
//
// Like the broad call, it shares one resource among N clients, but it
// tolerates a new request that arrives while the previous client's
// acknowledge is still high (a weak-broad sequencer moves on as soon as its
// work request falls). Each client request is gated by the absence of every
// other client's acknowledge, so neither the new resource request nor the
// new acknowledge is issued until the previous acknowledge has fallen.
//
// Circuit, per client i: g[i] = req[i] & ~(acknowledge of any other client);
// rs = OR of g; ack[i] = C(g[i], as). With two clients the gate inputs
// cross over: client 1 is gated by ack 2 and client 2 by ack 1.
// Requirement on the clients: a new request arrives only after any earlier
// request has fallen; requests are not concurrent.
//
// Interface: req[i]/ack[i] client handshakes, rs/as resource handshake,
// active-low master clear. Timing: no clock.
//
// Each client's gate reads the other clients' acknowledges, which depend on
// their gates in turn: simulators report this cross-coupling as a
// combinational loop. It is the mutual blocking the element is built for.
module call_weak_broad_4ph #(
  parameter int unsigned N = 2
) (
  input  logic         mc_n,
  input  logic [N-1:0] req,
  output logic [N-1:0] ack,
  output logic         rs,
  input  logic         as
);

  logic [N-1:0] g;

  for (genvar i = 0; i < N; i++) begin : g_client
    logic [N-1:0] others;
    always_comb begin
      others    = ack;
      others[i] = 1'b0;
    end
    assign g[i] = req[i] & ~(|others);

    c_element #(.N(2)) u_ack (
      .mc_n (mc_n),
      .in   ({g[i], as}),
      .out  (ack[i])
    );
  end

  assign rs = |g;

endmodule
