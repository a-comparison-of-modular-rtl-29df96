`timescale 1ns / 1ps
// Self-timed control segments side by side, one per sequencing style.
//
// The same piece of a processor control loop (AC -> MB; write memory in
// parallel with AC+1 -> AC and a conditional LINK complement; PC+1 -> PC
// unless SKIP is false; then F -> IX) built five times, each with its own
// copy of the register datapath:
//   segment 0  4-phase, flat broad sequencers and broad call
//   segment 1  4-phase, flat weak-broad sequencers and weak-broad call
//   segment 2  4-phase, flat narrow sequencers, narrow call, latched selects
//   segment 3  4-phase, hierarchical van Berkel sequencers at every level,
//              broad call, latched selects
//   2-phase    transition signalling, wire sequencing, xor merges
// Putting them side by side lets the styles be compared on one algorithm.
//
// Interface, per 4-phase segment k (index k of each array): ir1/ia1 start
// the segment (in segment 3, ia1 rises only after the or4/oa4 handshake,
// since a hierarchical sequence acknowledges when it is complete), or4/oa4
// pass control on, wr4/wa4 request the F -> IX work,
// mem_req/mem_ack write mem_data (the MB register) to memory, skip is the
// branch condition, ac/mb/pc/link/carryout show the registers. The 2-phase
// segment has the same signals with the suffix _2ph, in transition
// signalling: r1_2ph starts it and r4_2ph requests F -> IX. ac_init,
// pc_init and link_init are loaded into every datapath during master clear
// (mc_n low). Timing: no clock; each unit of work acknowledges DELAY ns
// after its request.
//
// The control of each segment and its datapath form handshake rings with no
// clocked register in them, so simulators report combinational loops
// through the segment wiring. They are intended: each ring is broken in
// time by the matched delay of the work acknowledge.
module selftimed_top
  import selftimed_pkg::*;
#(
  parameter int unsigned W     = WORD_W,
  parameter int unsigned DELAY = 5
) (
  input  logic                mc_n,
  input  logic [W-1:0]        ac_init,
  input  logic [W-1:0]        pc_init,
  input  logic                link_init,

  // 4-phase segments (0 broad, 1 weak-broad, 2 narrow, 3 hierarchical)
  input  logic [3:0]          ir1,
  output logic [3:0]          ia1,
  output logic [3:0]          or4,
  input  logic [3:0]          oa4,
  output logic [3:0]          wr4,
  input  logic [3:0]          wa4,
  output logic [3:0]          mem_req,
  input  logic [3:0]          mem_ack,
  output logic [3:0][W-1:0]   mem_data,
  input  logic [3:0]          skip,
  output logic [3:0][W-1:0]   ac,
  output logic [3:0][W-1:0]   mb,
  output logic [3:0][W-1:0]   pc,
  output logic [3:0]          link,
  output logic [3:0]          carryout,

  // 2-phase segment
  input  logic                r1_2ph,
  output logic                r4_2ph,
  output logic                mem_req_2ph,
  input  logic                mem_ack_2ph,
  output logic [W-1:0]        mem_data_2ph,
  input  logic                skip_2ph,
  output logic [W-1:0]        ac_2ph,
  output logic [W-1:0]        mb_2ph,
  output logic [W-1:0]        pc_2ph,
  output logic                link_2ph,
  output logic                carryout_2ph
);

  localparam seq_style_e STYLES [4] = '{SEQ_BROAD, SEQ_WEAK_BROAD, SEQ_NARROW, SEQ_HIER};

  for (genvar k = 0; k < 4; k++) begin : g_seg4
    logic wr1, wa1, wr2a, wa2a, cpl_req, cpl_ack, wr3, wa3;

    ctrl_seg_4ph #(.STYLE(STYLES[k])) u_ctrl (
      .mc_n     (mc_n),
      .ir1      (ir1[k]),      .ia1     (ia1[k]),
      .or4      (or4[k]),      .oa4     (oa4[k]),
      .skip     (skip[k]),     .carryout(carryout[k]),
      .wr1      (wr1),         .wa1     (wa1),
      .mem_req  (mem_req[k]),  .mem_ack (mem_ack[k]),
      .wr2a     (wr2a),        .wa2a    (wa2a),
      .cpl_req  (cpl_req),     .cpl_ack (cpl_ack),
      .wr3      (wr3),         .wa3     (wa3),
      .wr4      (wr4[k]),      .wa4     (wa4[k])
    );

    seg_datapath #(.W(W), .TWO_PHASE(1'b0), .DELAY(DELAY)) u_dp (
      .mc_n     (mc_n),
      .ac_init  (ac_init),     .pc_init (pc_init),  .link_init(link_init),
      .mb_req   (wr1),         .mb_ack  (wa1),
      .inc_req  (wr2a),        .inc_ack (wa2a),
      .cpl_req  (cpl_req),     .cpl_ack (cpl_ack),
      .pc_req   (wr3),         .pc_ack  (wa3),
      .ac       (ac[k]),       .mb      (mb[k]),
      .pc       (pc[k]),       .link    (link[k]),
      .carryout (carryout[k])
    );

    assign mem_data[k] = mb[k];
  end

  begin : g_seg2
    logic mb_req, mb_ack, inc_req, inc_ack, cpl_req, cpl_ack, pc_req, pc_ack;

    ctrl_seg_2ph u_ctrl (
      .mc_n     (mc_n),
      .r1       (r1_2ph),      .r4      (r4_2ph),
      .skip     (skip_2ph),    .carryout(carryout_2ph),
      .mb_req   (mb_req),      .mb_ack  (mb_ack),
      .mem_req  (mem_req_2ph), .mem_ack (mem_ack_2ph),
      .inc_req  (inc_req),     .inc_ack (inc_ack),
      .cpl_req  (cpl_req),     .cpl_ack (cpl_ack),
      .pc_req   (pc_req),      .pc_ack  (pc_ack)
    );

    seg_datapath #(.W(W), .TWO_PHASE(1'b1), .DELAY(DELAY)) u_dp (
      .mc_n     (mc_n),
      .ac_init  (ac_init),     .pc_init (pc_init),  .link_init(link_init),
      .mb_req   (mb_req),      .mb_ack  (mb_ack),
      .inc_req  (inc_req),     .inc_ack (inc_ack),
      .cpl_req  (cpl_req),     .cpl_ack (cpl_ack),
      .pc_req   (pc_req),      .pc_ack  (pc_ack),
      .ac       (ac_2ph),      .mb      (mb_2ph),
      .pc       (pc_2ph),      .link    (link_2ph),
      .carryout (carryout_2ph)
    );

    assign mem_data_2ph = mb_2ph;
  end

endmodule
