`timescale 1ns / 1ps
// Muller C-element with active-low master clear.
//
// The output goes high when every input is high, goes low when every input
// is low, and holds its value otherwise. It is the join of parallel
// branches and the state-holding core of every sequencer and call element
// in this library. Inversions drawn as bubbles on an input are applied by
// the instantiating module.
//
// Interface: mc_n clears the output to 0 while low; in[N-1:0] are the
// inputs; out is the state-holding output.
// Timing: no clock. The element is modelled as a level-sensitive latch
// (always_latch) whose set and clear conditions are the all-high and
// all-low input states, so synthesis and lint report a latch here; that
// latch is the intended state-holding element of the self-timed circuit.
//
// The output feeds back into its own hold condition, and in the circuits
// built from it the output returns to the inputs through the handshake;
// simulators report these as combinational loops. They are the feedback
// that stores the state and are intended.
module c_element #(
  parameter int unsigned N = 2
) (
  input  logic         mc_n,
  input  logic [N-1:0] in,
  output logic         out
);

  always_latch begin
    if (!mc_n)        out = 1'b0;
    else if (&in)     out = 1'b1;
    else if (!(|in))  out = 1'b0;
  end

endmodule
