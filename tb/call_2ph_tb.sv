`timescale 1ns / 1ps
// Self-checking test of call_2ph.
//
// Two clients make NREQ transition-signalled calls in random order, each
// waiting for the previous call to be acknowledged. The resource answers
// each resource request transition with an acknowledge transition after a
// random delay. Checks that each call produces exactly one resource
// request event and exactly one acknowledge event, on the calling client
// only.
module call_2ph_tb;

  localparam int NREQ = 60;

  logic mc_n, r1, a1, r2, a2, rs, as;
  int checks = 0, failures = 0, n_rs = 0;
  bit started = 1'b0;

  call_2ph dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always @(rs) if (started) begin
    n_rs++;
    #(1 + ($urandom % 8)) as = rs;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic a1_0, a2_0;
    int rs0;
    mc_n = 1'b0; r1 = 1'b0; r2 = 1'b0; as = 1'b0;
    #5 mc_n = 1'b1;
    #5 started = 1'b1;
    for (int k = 0; k < NREQ; k++) begin
      a1_0 = a1; a2_0 = a2; rs0 = n_rs;
      #(1 + ($urandom % 5));
      if ($urandom % 2) begin
        r1 = ~r1;
        wait (a1 == r1);
        check(as == rs, "client 1 acknowledged only after the resource");
        #10;
        check(a2 == a2_0, "client 2 acknowledge untouched by a call of client 1");
      end else begin
        r2 = ~r2;
        wait (a2 == r2);
        check(as == rs, "client 2 acknowledged only after the resource");
        #10;
        check(a1 == a1_0, "client 1 acknowledge untouched by a call of client 2");
      end
      check(n_rs == rs0 + 1, "one resource request event per call");
      check(as == rs, "resource handshake complete");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
