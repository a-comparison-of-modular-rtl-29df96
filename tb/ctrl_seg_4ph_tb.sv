`timescale 1ns / 1ps
// Self-checking test of ctrl_seg_4ph in its four styles.
//
// One instance per style (flat broad, flat weak-broad, flat narrow,
// hierarchical). The
// testbench answers every unit of work after a random delay and plays the
// datapath's CARRYOUT flag, which it sets when the AC + 1 work is done,
// with a random value. For every pass through the segment it logs the
// order in which the units of work were requested and checks it against
// the control flow: AC -> MB first; the memory write and AC + 1 in
// parallel; complement LINK after AC + 1 exactly when CARRYOUT is false;
// PC + 1 after the fork has joined exactly when SKIP is true; F -> IX
// last. It also checks how far each style lets step 2 overlap step 1:
// broad starts step 2 only after step 1's work handshake is fully back at
// zero (so does the hierarchical style), weak-broad only after step 1's
// request has fallen, and narrow must overlap at least once. The flat
// styles must acknowledge the segment's input before its output request
// rises (early acknowledge); the hierarchical style only after the output
// acknowledge has risen (the whole sequence is done).
module ctrl_seg_4ph_tb;
  import selftimed_pkg::*;

  localparam int NPASS = 40;
  localparam seq_style_e STY [4] = '{SEQ_BROAD, SEQ_WEAK_BROAD, SEQ_NARROW, SEQ_HIER};

  logic mc_n;
  logic [3:0] ir1, ia1, or4, oa4, skip, carryout;
  logic [3:0] wr1, wa1, mem_req, mem_ack, wr2a, wa2a, cpl_req, cpl_ack, wr3, wa3, wr4, wa4;
  int checks = 0, failures = 0;
  bit started = 1'b0;
  bit cy_plan [4];
  int n_overlap [4];
  int n_cpl [4], n_pc [4];
  string log_s [4];

  for (genvar k = 0; k < 4; k++) begin : g_dut
    ctrl_seg_4ph #(.STYLE(STY[k])) dut (
      .mc_n, .ir1(ir1[k]), .ia1(ia1[k]), .or4(or4[k]), .oa4(oa4[k]),
      .skip(skip[k]), .carryout(carryout[k]),
      .wr1(wr1[k]), .wa1(wa1[k]), .mem_req(mem_req[k]), .mem_ack(mem_ack[k]),
      .wr2a(wr2a[k]), .wa2a(wa2a[k]), .cpl_req(cpl_req[k]), .cpl_ack(cpl_ack[k]),
      .wr3(wr3[k]), .wa3(wa3[k]), .wr4(wr4[k]), .wa4(wa4[k])
    );

    // units of work: log the request, answer after a random delay
    always begin
      wait (started && wr1[k]); log_s[k] = {log_s[k], "M"};
      #(1 + $urandom % 6) wa1[k] = 1'b1; wait (!wr1[k]); #(1 + $urandom % 6) wa1[k] = 1'b0;
    end
    always begin
      wait (started && mem_req[k]); log_s[k] = {log_s[k], "W"};
      #(1 + $urandom % 6) mem_ack[k] = 1'b1; wait (!mem_req[k]); #(1 + $urandom % 6) mem_ack[k] = 1'b0;
    end
    always begin
      wait (started && wr2a[k]); log_s[k] = {log_s[k], "I"};
      #(1 + $urandom % 6) carryout[k] = cy_plan[k];
      #1 wa2a[k] = 1'b1; wait (!wr2a[k]); #(1 + $urandom % 6) wa2a[k] = 1'b0;
    end
    always begin
      wait (started && cpl_req[k]); log_s[k] = {log_s[k], "L"}; n_cpl[k]++;
      #(1 + $urandom % 6) cpl_ack[k] = 1'b1; wait (!cpl_req[k]); #(1 + $urandom % 6) cpl_ack[k] = 1'b0;
    end
    always begin
      wait (started && wr3[k]); log_s[k] = {log_s[k], "P"}; n_pc[k]++;
      #(1 + $urandom % 6) wa3[k] = 1'b1; wait (!wr3[k]); #(1 + $urandom % 6) wa3[k] = 1'b0;
    end
    always begin
      wait (started && wr4[k]); log_s[k] = {log_s[k], "F"};
      #(1 + $urandom % 6) wa4[k] = 1'b1; wait (!wr4[k]); #(1 + $urandom % 6) wa4[k] = 1'b0;
    end
    // output side: the next step
    always begin
      wait (started && or4[k]);
      #(1 + $urandom % 6) oa4[k] = 1'b1; wait (!or4[k]); #(1 + $urandom % 6) oa4[k] = 1'b0;
    end
    // overlap of step 2 with step 1
    always @(posedge mem_req[k]) if (started) begin
      if (wr1[k] || wa1[k]) n_overlap[k]++;
      if (STY[k] == SEQ_BROAD || STY[k] == SEQ_HIER)
        check(!wr1[k] && !wa1[k], "broad: step 2 starts after step 1 work restored");
      if (STY[k] == SEQ_WEAK_BROAD)
        check(!wr1[k], "weak-broad: step 2 starts after step 1 request fell");
    end
    // input acknowledge: early for the flat styles, last for hierarchical
    always @(posedge ia1[k]) if (started) begin
      if (STY[k] == SEQ_HIER)
        check(oa4[k], "hierarchical: input acknowledged after the whole sequence");
      else
        check(!or4[k], "flat: input acknowledged before the output request");
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic run(input int k, input bit sk, input bit cy);
    string exp_a, exp_b;
    log_s[k] = "";
    skip[k] = sk;
    cy_plan[k] = cy;
    fork
      begin
        ir1[k] = 1'b1;
        wait (ia1[k]);
        #(1 + $urandom % 4) ir1[k] = 1'b0;
        wait (!ia1[k]);
      end
      begin
        wait (or4[k]);
        wait (!or4[k] && !oa4[k]);
      end
    join
    #10;
    // the fork may issue the memory write and AC + 1 in either order
    exp_a = {"MWI", cy ? "" : "L", sk ? "P" : "", "F"};
    exp_b = {"MIW", cy ? "" : "L", sk ? "P" : "", "F"};
    if (!cy) begin
      // complement LINK may also come before the memory write is logged
      if (log_s[k] == {"MIL", "W", sk ? "P" : "", "F"}) exp_b = log_s[k];
    end
    check(log_s[k] == exp_a || log_s[k] == exp_b,
          $sformatf("style %0d skip=%b carry=%b order %s expected %s", k, sk, cy, log_s[k], exp_a));
  endtask

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mc_n = 1'b1;
    ir1 = '0; oa4 = '0; skip = '0; carryout = '0;
    wa1 = '0; mem_ack = '0; wa2a = '0; cpl_ack = '0; wa3 = '0; wa4 = '0;
    for (int k = 0; k < 4; k++) begin
      n_overlap[k] = 0; n_cpl[k] = 0; n_pc[k] = 0; cy_plan[k] = 1'b0;
    end
    #1 mc_n = 1'b0;
    #5 mc_n = 1'b1;
    #5 started = 1'b1;
    for (int i = 0; i < NPASS; i++)
      for (int k = 0; k < 4; k++) run(k, i[0], i[1]);
    for (int k = 0; k < 4; k++) begin
      check(n_cpl[k] == NPASS / 2 && n_pc[k] == NPASS / 2,
            $sformatf("style %0d: %0d LINK complements, %0d PC increments", k, n_cpl[k], n_pc[k]));
      $display("style %0d: step-2 overlaps of step 1: %0d", k, n_overlap[k]);
    end
    check(n_overlap[2] > 0, "narrow: step 2 overlapped step 1's work");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
