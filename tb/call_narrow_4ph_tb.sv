`timescale 1ns / 1ps
// Self-checking test of call_narrow_4ph.
//
// Two clients call one shared resource NREQ times in random order. Each
// client raises its request, drops it after its acknowledge and waits for
// the acknowledge to fall; the resource answers after random delays. As behind narrow sequencers, a new call may start as soon as the previous call has been acknowledged, while its request is still high.
// Checks: an acknowledge rises only for a client whose request is high,
// only while the resource acknowledge is high and never while the other
// client's acknowledge is high; the resource sees exactly one complete
// handshake per call; every call is acknowledged exactly once.
// The test also requires that some calls overlapped a previous request.
module call_narrow_4ph_tb;

  localparam int NREQ = 60;

  logic       mc_n;
  logic [1:0] req, ack;
  logic       rs, as;
  int checks = 0, failures = 0;
  int n_rs = 0, n_issued = 0, n_overlap = 0;
  int n_ack [2];
  int n_req [2];
  bit started = 1'b0;

  call_narrow_4ph #(.N(2)) dut (.*);

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

  // shared resource
  always begin
    wait (started && rs);
    n_rs++;
    #(rdel()) as = 1'b1;
    wait (!rs);
    #(rdel()) as = 1'b0;
  end

  // clients: drop the request after the acknowledge
  for (genvar i = 0; i < 2; i++) begin : g_cli
    always begin
      wait (started && req[i] && ack[i]);
      #(rdel()) req[i] = 1'b0;
      wait (!ack[i]);
    end
    always @(posedge ack[i]) if (started) begin
      n_ack[i]++;
      check(req[i], $sformatf("ack%0d only for a pending request", i));
      check(as, $sformatf("ack%0d only with the resource acknowledge", i));
      check(!ack[1-i], $sformatf("ack%0d never with the other acknowledge high", i));
    end
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c, p;
    mc_n = 1'b0; req = '0; as = 1'b0;
    n_ack = '{0, 0}; n_req = '{0, 0};
    #5 mc_n = 1'b1;
    #5 started = 1'b1;
    p = 0;
    for (int k = 0; k < NREQ; k++) begin
      c = $urandom % 2;
      if (k > 0) begin
        wait (ack[p] || (!req[p] && !ack[p]));
      end
      wait (!req[c] && !ack[c]);
      #(rdel());
      if (req[p] && c != p) n_overlap++;
      req[c] = 1'b1;
      n_req[c]++;
      p = c;
    end
    wait (n_ack[0] + n_ack[1] == NREQ);
    wait (!req[0] && !req[1] && !ack[0] && !ack[1] && !as);
    #20;
    check(n_rs == NREQ, $sformatf("resource handshakes %0d, calls %0d", n_rs, NREQ));
    check(n_ack[0] == n_req[0] && n_ack[1] == n_req[1],
          $sformatf("acks %0d/%0d for calls %0d/%0d", n_ack[0], n_ack[1], n_req[0], n_req[1]));
    check(!rs, "resource request back at zero");
    check(n_overlap > 0, $sformatf("calls made while the previous request was high: %0d", n_overlap));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
