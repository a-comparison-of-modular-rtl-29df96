`timescale 1ns / 1ps
// Self-checking test of ctrl_seg_2ph.
//
// The testbench answers every unit of work with an acknowledge transition
// after a random delay and plays the datapath's CARRYOUT flag, which it
// sets when the AC + 1 work is done, with a planned value. For every pass
// (one transition on r1) it logs the order of the work requests and
// checks it against the control flow: AC -> MB; memory write and AC + 1 in
// parallel; complement LINK exactly when CARRYOUT is false; PC + 1 after
// the join exactly when SKIP is true; then exactly one transition on r4,
// the request for the F -> IX step, made only once every unit of work has
// acknowledged.
module ctrl_seg_2ph_tb;

  localparam int NPASS = 40;

  logic mc_n, r1, r4, skip, carryout;
  logic mb_req, mb_ack, mem_req, mem_ack, inc_req, inc_ack, cpl_req, cpl_ack, pc_req, pc_ack;
  int checks = 0, failures = 0, n_r4 = 0;
  bit started = 1'b0;
  bit cy_plan;
  string log_s;

  ctrl_seg_2ph dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always @(mb_req)  if (started) begin log_s = {log_s, "M"}; #(1 + $urandom % 6) mb_ack = mb_req; end
  always @(mem_req) if (started) begin log_s = {log_s, "W"}; #(1 + $urandom % 6) mem_ack = mem_req; end
  always @(inc_req) if (started) begin
    log_s = {log_s, "I"};
    #(1 + $urandom % 6) carryout = cy_plan;
    #1 inc_ack = inc_req;
  end
  always @(cpl_req) if (started) begin log_s = {log_s, "L"}; #(1 + $urandom % 6) cpl_ack = cpl_req; end
  always @(pc_req)  if (started) begin log_s = {log_s, "P"}; #(1 + $urandom % 6) pc_ack = pc_req; end
  always @(r4) if (started) begin
    n_r4++;
    check(mb_req == mb_ack && mem_req == mem_ack && inc_req == inc_ack &&
          cpl_req == cpl_ack && pc_req == pc_ack,
          "F -> IX requested only after every unit of work has finished");
  end

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string exp_a, exp_b;
    int r40;
    mc_n = 1'b1; r1 = 1'b0; skip = 1'b0; carryout = 1'b0; cy_plan = 1'b0;
    mb_ack = 1'b0; mem_ack = 1'b0; inc_ack = 1'b0; cpl_ack = 1'b0; pc_ack = 1'b0;
    #1 mc_n = 1'b0;
    #5 mc_n = 1'b1;
    #5 started = 1'b1;
    for (int i = 0; i < NPASS; i++) begin
      log_s = "";
      skip = i[0];
      cy_plan = i[1];
      r40 = n_r4;
      #1 r1 = ~r1;
      wait (n_r4 == r40 + 1);
      #20;
      exp_a = {"MWI", cy_plan ? "" : "L", skip ? "P" : ""};
      exp_b = {"MIW", cy_plan ? "" : "L", skip ? "P" : ""};
      check(log_s == exp_a || log_s == exp_b,
            $sformatf("skip=%b carry=%b order %s expected %s", skip, cy_plan, log_s, exp_a));
      check(n_r4 == r40 + 1, "exactly one F -> IX request per pass");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
