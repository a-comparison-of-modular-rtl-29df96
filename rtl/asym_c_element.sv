`timescale 1ns / 1ps
// Asymmetric C-element with active-low master clear.
//
// A C-element in which some inputs take part in only one transition. The
// output rises when all common inputs and all plus inputs are high, and
// falls when all common inputs are low; the plus inputs do not hold the
// output up. The flat narrow sequencer and the narrow call element use it
// to let a condition gate the rising edge of a request without delaying its
// return to zero.
//
// Interface: mc_n clears the output while low; common[NC-1:0] act on both
// transitions; plus[NP-1:0] act on the rising transition only; out is the
// state-holding output.
// Timing: no clock; modelled as a level-sensitive latch (always_latch), so
// tools report a latch here by design.
//
// The output feeds back into its own hold condition, and in the circuits
// built from it the output returns to the inputs through the handshake;
// simulators report these as combinational loops. They are the feedback
// that stores the state and are intended.
module asym_c_element #(
  parameter int unsigned NC = 1,
  parameter int unsigned NP = 1
) (
  input  logic          mc_n,
  input  logic [NC-1:0] common,
  input  logic [NP-1:0] plus,
  output logic          out
);

  always_latch begin
    if (!mc_n)                   out = 1'b0;
    else if (&common && &plus)   out = 1'b1;
    else if (!(|common))         out = 1'b0;
  end

endmodule
