`timescale 1ns / 1ps
// 4-phase select element (if-then-else for handshake control).
//
// Steers an input request to the true or the false branch according to a
// level condition, and returns the branch's acknowledge as the input
// acknowledge. In its plain form it is a demultiplexer, and the condition
// must stay stable for as long as the input request is high. With LATCHED
// set, the condition passes through a latch that is transparent while the
// input request is low and holds while it is high, so a later step that
// changes the condition cannot redirect a request that is still high.
//
// Interface: in_req/in_ack input handshake; cond the branch condition;
// t_req/t_ack and f_req/f_ack the branch handshakes. Timing: no clock;
// the condition must be stable when in_req rises (no metastability
// protection, so it must not come from an unsynchronised source).
module select_4ph #(
  parameter bit LATCHED = 1'b0
) (
  input  logic in_req,
  output logic in_ack,
  input  logic cond,
  output logic t_req,
  input  logic t_ack,
  output logic f_req,
  input  logic f_ack
);

  logic c;

  if (LATCHED) begin : g_latched
    always_latch begin
      if (!in_req) c = cond;
    end
  end else begin : g_comb
    assign c = cond;
  end

  assign t_req  = in_req & c;
  assign f_req  = in_req & ~c;
  assign in_ack = t_ack | f_ack;

endmodule
