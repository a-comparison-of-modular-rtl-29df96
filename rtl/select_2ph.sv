`timescale 1ns / 1ps
// 2-phase (transition-signalling) select element.
//
// A transition on the input request produces a transition on the true or
// the false output according to the condition at the moment of the input
// transition. The element holds state: it compares the input with the
// parity of its two outputs, and a difference means an input event that
// has not yet been steered. The chosen output is then set to the input xor
// the other output, which restores the parity in one step (an update that
// gives the same result however often it is evaluated). The condition is
// read only while an event is pending, so it may change freely between
// requests.
//
// Interface: in_req the input transition wire; cond the branch condition;
// t_req/f_req the branch transition wires; mc_n clears both outputs.
// Timing: no clock; modelled as a latch (always_latch) that is open only
// while an input event is pending, so tools report a latch here by design.
//
// Each output is computed from the other and from itself, and the
// element sits inside handshake rings; simulators report combinational
// loops here. They are the state-holding feedback of the element and are
// intended.
module select_2ph (
  input  logic mc_n,
  input  logic in_req,
  input  logic cond,
  output logic t_req,
  output logic f_req
);

  logic pending;

  assign pending = in_req ^ t_req ^ f_req;

  always_latch begin
    if (!mc_n) begin
      t_req = 1'b0;
      f_req = 1'b0;
    end else if (pending) begin
      if (cond) t_req = in_req ^ f_req;
      else      f_req = in_req ^ t_req;
    end
  end

endmodule
