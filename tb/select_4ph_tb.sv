`timescale 1ns / 1ps
// Self-checking test of select_4ph, plain and latched.
//
// Runs random 4-phase requests through both forms with a random condition,
// answers each branch request from the testbench, and checks that the
// request reaches exactly the branch the condition names and that the
// branch acknowledge returns as the input acknowledge. Halfway through each
// request the condition is inverted: the latched form must keep the branch
// it chose, the plain form must follow the new condition.
module select_4ph_tb;

  logic in_req, cond;
  logic [1:0] in_ack, t_req, f_req, t_ack, f_ack;
  int checks = 0, failures = 0;

  select_4ph #(.LATCHED(1'b0)) dut_c (.in_req, .in_ack(in_ack[0]), .cond,
    .t_req(t_req[0]), .t_ack(t_ack[0]), .f_req(f_req[0]), .f_ack(f_ack[0]));
  select_4ph #(.LATCHED(1'b1)) dut_l (.in_req, .in_ack(in_ack[1]), .cond,
    .t_req(t_req[1]), .t_ack(t_ack[1]), .f_req(f_req[1]), .f_ack(f_ack[1]));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit c;
    in_req = 1'b0; cond = 1'b0; t_ack = '0; f_ack = '0;
    #2;
    for (int i = 0; i < 100; i++) begin
      c = 1'($urandom);
      cond = c;
      #1 in_req = 1'b1;
      #1;
      for (int k = 0; k < 2; k++) begin
        check(t_req[k] == c && f_req[k] == !c, $sformatf("form %0d steers by cond=%b", k, c));
        check(!in_ack[k], "no acknowledge before the branch answers");
      end
      // answer the chosen branch
      if (c) t_ack = '1; else f_ack = '1;
      #1;
      for (int k = 0; k < 2; k++) check(in_ack[k], $sformatf("form %0d acknowledge returned", k));
      // condition changes while the request is still high
      cond = !c;
      #1;
      check(t_req[1] == c && f_req[1] == !c, "latched form keeps its branch");
      check(t_req[0] == !c && f_req[0] == c, "plain form follows the condition");
      in_req = 1'b0;
      #1;
      check(t_req == '0 && f_req == '0, "branch requests fall with the input request");
      t_ack = '0; f_ack = '0;
      #1 check(in_ack == '0, "acknowledge falls");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
