`timescale 1ns / 1ps
// Self-checking test of select_2ph.
//
// Sends NREQ input transitions with a random condition and checks that
// each produces exactly one transition, on the output the condition named
// at the time of the input event. Between events the condition is toggled
// several times, which must produce no output event.
module select_2ph_tb;

  localparam int NREQ = 100;

  logic mc_n, in_req, cond, t_req, f_req;
  int checks = 0, failures = 0, n_t = 0, n_f = 0;

  select_2ph dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic t0, f0;
    bit c;
    mc_n = 1'b0; in_req = 1'b0; cond = 1'b0;
    #5 mc_n = 1'b1;
    #5;
    check(!t_req && !f_req, "outputs start low");
    for (int k = 0; k < NREQ; k++) begin
      c = 1'($urandom);
      cond = c;
      t0 = t_req; f0 = f_req;
      #1 in_req = ~in_req;
      #1;
      if (c) n_t++; else n_f++;
      check(t_req == (t0 ^ c) && f_req == (f0 ^ !c),
            $sformatf("event %0d steered by cond=%b", k, c));
      t0 = t_req; f0 = f_req;
      repeat (3) #1 cond = ~cond;
      #1 check(t_req == t0 && f_req == f0, "condition changes alone make no event");
    end
    check(n_t > 0 && n_f > 0, "both branches used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
