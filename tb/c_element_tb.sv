`timescale 1ns / 1ps
// Self-checking test of c_element.
//
// Drives a 2-input and a 3-input C-element with random input vectors and
// compares each output with a reference that holds the previous output
// unless all inputs agree. Also checks that master clear forces the output
// low even with all inputs high, and that both set and hold occurred.
module c_element_tb;

  logic       mc_n;
  logic [1:0] in2;
  logic [2:0] in3;
  logic       out2, out3;
  logic       exp2, exp3;
  int checks = 0, failures = 0, n_hold = 0, n_set = 0;

  c_element #(.N(2)) dut2 (.mc_n(mc_n), .in(in2), .out(out2));
  c_element #(.N(3)) dut3 (.mc_n(mc_n), .in(in3), .out(out3));

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
    mc_n = 1'b0; in2 = '1; in3 = '1;
    #1 check(!out2 && !out3, "master clear wins over all-high inputs");
    in2 = '0; in3 = '0;
    #1 mc_n = 1'b1;
    exp2 = 1'b0; exp3 = 1'b0;
    for (int i = 0; i < 400; i++) begin
      in2 = 2'($urandom);
      in3 = 3'($urandom);
      if (&in2) exp2 = 1'b1; else if (~|in2) exp2 = 1'b0; else n_hold++;
      if (&in3) begin exp3 = 1'b1; n_set++; end else if (~|in3) exp3 = 1'b0;
      #1;
      check(out2 == exp2, $sformatf("2-input in=%b out=%b exp=%b", in2, out2, exp2));
      check(out3 == exp3, $sformatf("3-input in=%b out=%b exp=%b", in3, out3, exp3));
    end
    check(n_hold > 0 && n_set > 0, "hold and set both exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
