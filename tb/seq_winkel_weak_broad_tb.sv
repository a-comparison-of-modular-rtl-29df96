`timescale 1ns / 1ps
// Self-checking test of seq_winkel_weak_broad.
//
// The testbench is the sequencer's environment on all three handshakes:
// an input driver that raises the input request and returns it to zero
// after the acknowledge, a work unit and a next step that answer their
// requests after random delays. It runs NCYC complete cycles and checks,
// at every transition of the sequencer's outputs, the ordering rules of
// this sequencing style: the work request rises only with the input request high and the output acknowledge low; the input acknowledge is the work acknowledge; the output request rises when the work request has fallen and the output acknowledge is low (weak-broad release), and does so at least once while the work acknowledge is still high.
// It also checks that every handshake completed NCYC times.
module seq_winkel_weak_broad_tb;

  localparam int NCYC = 40;

  logic mc_n, in_req, in_ack, wk_req, wk_ack, out_req, out_ack;
  int checks = 0, failures = 0;
  int n_in = 0, n_wk = 0, n_out = 0, n_oa_rise = 0, n_overlap = 0;
  bit started = 1'b0;

  seq_winkel_weak_broad dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic int rdel();
    return 1 + ($urandom % 8);
  endfunction

  // work unit
  always begin
    wait (started && wk_req);
    #(rdel()) wk_ack = 1'b1;
    wait (!wk_req);
    #(rdel()) wk_ack = 1'b0;
    n_wk++;
  end

  // next step
  always begin
    wait (started && out_req);
    #(rdel()) out_ack = 1'b1;
    n_oa_rise++;
    wait (!out_req);
    #(rdel()) out_ack = 1'b0;
    n_out++;
  end

  // ordering rules
  always @(posedge wk_req) if (started) begin
    check(in_req && !out_ack, "WR rises only with IR high and OA low");
  end
  always @(posedge out_req) if (started) begin
    check(!wk_req && !out_ack, "OR only after WR fell, with OA low");
    if (wk_ack) n_overlap++;
  end
  always @(posedge in_ack) if (started) begin
    check(wk_ack, "IA rises with WA");
  end
  always @(negedge in_ack) if (started) begin
    check(!wk_ack, "IA falls with WA");
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mc_n = 1'b0; in_req = 1'b0; wk_ack = 1'b0; out_ack = 1'b0;
    #5 mc_n = 1'b1;
    #5 started = 1'b1;
    for (int i = 0; i < NCYC; i++) begin
      // a flat step takes no new request before its output was acknowledged
      wait (n_oa_rise >= i);
      #(rdel()) in_req = 1'b1;
      wait (in_ack);
      #(rdel()) in_req = 1'b0;
      wait (!in_ack);
      n_in++;
    end
    wait (n_out == NCYC && n_wk == NCYC);
    #20;
    check(n_in == NCYC && n_wk == NCYC && n_out == NCYC,
          $sformatf("handshake counts in %0d work %0d out %0d", n_in, n_wk, n_out));
    check(!wk_req && !out_req && !in_ack, "all outputs back at zero");
    check(n_overlap > 0, $sformatf("OR rose before WA fell %0d times", n_overlap));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
