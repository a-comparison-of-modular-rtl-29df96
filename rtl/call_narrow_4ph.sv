`timescale 1ns / 1ps
// 4-phase call element for narrow work release.
//
// Shares one resource among N clients when a new request may arrive while
// an earlier request is still high, as happens behind narrow-release
// sequencers. A new request is held back until every other client's
// request and acknowledge have fallen. Since the earlier acknowledge must
// fall first, the new acknowledge cannot be given on the earlier call's
// resource acknowledge. It is the largest of the call elements.
//
// Circuit, per client i, with AC an asymmetric C-element whose plus inputs
// gate only the rising edge:
//   g[i]   = AC(common req[i]; plus NOR(req[others], ack[others]))
//   rs     = OR of g
//   ack[i] = AC(common as;     plus g[i])
// The gate structure (a NOR of the other client's request and acknowledge
// feeding an AC per client, an OR for the resource request, an AC per
// acknowledge) follows the published two-client circuit. Which input of
// each AC acts on the rising edge only is this design's reading: the
// acknowledge falls with the resource acknowledge, so a stale resource
// acknowledge can never answer the next client.
//
// Interface: req[i]/ack[i] client handshakes, rs/as resource handshake,
// active-low master clear. Timing: no clock. Two requests that rise at the
// same instant while the resource is idle are not arbitrated.
//
// Each client's gate reads the other clients' requests and acknowledges,
// which depend on their gates in turn: simulators report this
// cross-coupling as a combinational loop. It is the mutual blocking the
// element is built for.
module call_narrow_4ph #(
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
    logic [N-1:0] r_oth, a_oth;
    always_comb begin
      r_oth    = req;
      a_oth    = ack;
      r_oth[i] = 1'b0;
      a_oth[i] = 1'b0;
    end

    asym_c_element #(.NC(1), .NP(1)) u_g (
      .mc_n   (mc_n),
      .common (req[i]),
      .plus   (~(|r_oth) & ~(|a_oth)),
      .out    (g[i])
    );

    asym_c_element #(.NC(1), .NP(1)) u_ack (
      .mc_n   (mc_n),
      .common (as),
      .plus   (g[i]),
      .out    (ack[i])
    );
  end

  assign rs = |g;

endmodule
