`timescale 1ns / 1ps
// Self-checking test of matched_delay.
//
// Toggles the input at random intervals longer than the delay and checks
// that the output takes each new value between DELAY - 0.5 ns and
// DELAY + 0.5 ns after the input.
module matched_delay_tb;

  localparam int unsigned DELAY = 5;

  logic in, out;
  int checks = 0, failures = 0;

  matched_delay #(.DELAY(DELAY)) dut (.*);

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
    in = 1'b0;
    #20;
    for (int k = 0; k < 50; k++) begin
      in = ~in;
      #(DELAY - 0.5);
      check(out != in, "output not changed before the delay");
      #1;
      check(out == in, "output changed within 0.5 ns after the delay");
      #(1 + ($urandom % 10));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
