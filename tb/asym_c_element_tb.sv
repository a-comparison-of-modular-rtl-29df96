`timescale 1ns / 1ps
// Self-checking test of asym_c_element.
//
// Drives an element with two common inputs and one plus input with random
// vectors and compares with a reference: the output rises when all inputs
// are high, falls when both common inputs are low whatever the plus input,
// and holds otherwise. Also checks master clear.
module asym_c_element_tb;

  logic       mc_n;
  logic [1:0] common;
  logic [0:0] plus;
  logic       out, exp;
  int checks = 0, failures = 0, n_fall_plus = 0;

  asym_c_element #(.NC(2), .NP(1)) dut (.*);

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
    mc_n = 1'b0; common = '1; plus = '1;
    #1 check(!out, "master clear");
    common = '0; plus = '0;
    #1 mc_n = 1'b1;
    exp = 1'b0;
    for (int i = 0; i < 400; i++) begin
      common = 2'($urandom);
      plus   = 1'($urandom);
      if (&common && &plus) exp = 1'b1;
      else if (~|common) begin
        if (exp && plus[0]) n_fall_plus++;
        exp = 1'b0;
      end
      #1 check(out == exp, $sformatf("common=%b plus=%b out=%b exp=%b", common, plus, out, exp));
    end
    check(n_fall_plus > 0, "fell with the plus input high");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
