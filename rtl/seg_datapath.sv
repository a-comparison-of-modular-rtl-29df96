`timescale 1ns / 1ps
// Register datapath acted on by the example control segments.
//
// Holds the PDP-8 registers touched by the segment: the accumulator AC, the
// memory buffer MB, the program counter PC, the LINK bit and the CARRYOUT
// flag of the last accumulator increment. It offers four units of work,
// each a bundled-data register transfer with its own request/acknowledge
// pair:
//   AC -> MB         mb_req/mb_ack
//   AC + 1 -> AC     inc_req/inc_ack   (carry out of bit W-1 -> CARRYOUT)
//   complement LINK  cpl_req/cpl_ack
//   PC + 1 -> PC     pc_req/pc_ack
// Each register has a single writer, so its load strobe is the request of
// that unit: the request level itself for 4-phase control (the
// request-only, "weak-broad", form of level control), or request xor
// acknowledge for 2-phase control (TWO_PHASE = 1), which is high from a
// request transition until its acknowledge. The register loads on the
// rising edge of its strobe; the acknowledge is the request passed
// through a matched delay of DELAY ns, so the new value is stable before
// the acknowledge is seen (the bundling constraint).
//
// Master clear (mc_n low) loads AC, PC and LINK from the *_init inputs and
// clears MB and CARRYOUT; the initial values are this design's way of
// starting a test from a chosen state.
module seg_datapath
  import selftimed_pkg::*;
#(
  parameter int unsigned W         = WORD_W,
  parameter bit          TWO_PHASE = 1'b0,
  parameter int unsigned DELAY     = 5
) (
  input  logic         mc_n,
  input  logic [W-1:0] ac_init,
  input  logic [W-1:0] pc_init,
  input  logic         link_init,

  input  logic         mb_req,
  output logic         mb_ack,
  input  logic         inc_req,
  output logic         inc_ack,
  input  logic         cpl_req,
  output logic         cpl_ack,
  input  logic         pc_req,
  output logic         pc_ack,

  output logic [W-1:0] ac,
  output logic [W-1:0] mb,
  output logic [W-1:0] pc,
  output logic         link,
  output logic         carryout
);

  logic mb_stb, inc_stb, cpl_stb, pc_stb;

  matched_delay #(.DELAY(DELAY)) u_d_mb  (.in(mb_req),  .out(mb_ack));
  matched_delay #(.DELAY(DELAY)) u_d_inc (.in(inc_req), .out(inc_ack));
  matched_delay #(.DELAY(DELAY)) u_d_cpl (.in(cpl_req), .out(cpl_ack));
  matched_delay #(.DELAY(DELAY)) u_d_pc  (.in(pc_req),  .out(pc_ack));

  if (TWO_PHASE) begin : g_2ph
    assign mb_stb  = mb_req  ^ mb_ack;
    assign inc_stb = inc_req ^ inc_ack;
    assign cpl_stb = cpl_req ^ cpl_ack;
    assign pc_stb  = pc_req  ^ pc_ack;
  end else begin : g_4ph
    assign mb_stb  = mb_req;
    assign inc_stb = inc_req;
    assign cpl_stb = cpl_req;
    assign pc_stb  = pc_req;
  end

  always_ff @(posedge mb_stb or negedge mc_n) begin
    if (!mc_n) mb <= '0;
    else       mb <= ac;
  end

  always_ff @(posedge inc_stb or negedge mc_n) begin
    if (!mc_n) {carryout, ac} <= {1'b0, ac_init};
    else       {carryout, ac} <= {1'b0, ac} + 1'b1;
  end

  always_ff @(posedge cpl_stb or negedge mc_n) begin
    if (!mc_n) link <= link_init;
    else       link <= ~link;
  end

  always_ff @(posedge pc_stb or negedge mc_n) begin
    if (!mc_n) pc <= pc_init;
    else       pc <= pc + 1'b1;
  end

endmodule
