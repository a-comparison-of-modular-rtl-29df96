`timescale 1ns / 1ps
// Behavioural model of a bundling (matched) delay.
//
// In bundled-data self-timed logic each unit of work acknowledges its
// request through a delay chosen to exceed the worst-case settling time of
// the data it produces. In silicon this is a chain of gates sized to the
// datapath; here it is a plain transport of the input to the output after
// DELAY time units, which synthesis reduces to a wire. Replace this module
// with a real delay line of the target technology.
//
// Interface: in the request (or any control wire); out the same wire,
// delayed. Timing: out follows in after DELAY ns (inertial: pulses shorter
// than DELAY are absorbed, which never happens on a handshake wire).
module matched_delay #(
  parameter int unsigned DELAY = 5
) (
  input  logic in,
  output logic out
);

  assign #(DELAY) out = in;

endmodule
