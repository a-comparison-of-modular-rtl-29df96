`timescale 1ns / 1ps
// Self-checking test of seg_datapath in its 4-phase and 2-phase forms.
//
// Issues NOPS random register transfers (AC -> MB, AC + 1 -> AC, complement
// LINK, PC + 1 -> PC) to both forms: 4-phase as a full request/acknowledge
// cycle, 2-phase as one request transition. A reference model predicts
// the registers. Checks the registers after every transfer, that each
// acknowledge arrives exactly DELAY ns after its request and not before,
// that master clear loads the initial values, and that the carry out of
// AC + 1 is produced at overflow.
module seg_datapath_tb;
  import selftimed_pkg::*;

  localparam int unsigned W = WORD_W, DELAY = 5, NOPS = 200;

  logic         mc_n;
  logic [W-1:0] ac_init, pc_init;
  logic         link_init;
  logic [1:0]   req [4];
  logic [1:0]   ack [4];
  logic [W-1:0] ac [2], mb [2], pc [2];
  logic [1:0]   link, carryout;
  int checks = 0, failures = 0, n_carry = 0;

  for (genvar f = 0; f < 2; f++) begin : g_dut
    seg_datapath #(.W(W), .TWO_PHASE(f == 1), .DELAY(DELAY)) dut (
      .mc_n, .ac_init, .pc_init, .link_init,
      .mb_req(req[0][f]),  .mb_ack(ack[0][f]),
      .inc_req(req[1][f]), .inc_ack(ack[1][f]),
      .cpl_req(req[2][f]), .cpl_ack(ack[2][f]),
      .pc_req(req[3][f]),  .pc_ack(ack[3][f]),
      .ac(ac[f]), .mb(mb[f]), .pc(pc[f]), .link(link[f]), .carryout(carryout[f])
    );
  end

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
    logic [W-1:0] m_ac, m_mb, m_pc;
    logic m_link, m_cy;
    int op;
    for (int u = 0; u < 4; u++) req[u] = '0;
    ac_init = 12'o7770; pc_init = 12'o4000; link_init = 1'b1;
    mc_n = 1'b1;
    #1 mc_n = 1'b0;
    #5 mc_n = 1'b1;
    m_ac = ac_init; m_pc = pc_init; m_link = link_init; m_mb = '0; m_cy = 1'b0;
    #10;
    for (int f = 0; f < 2; f++)
      check(ac[f] == m_ac && pc[f] == m_pc && link[f] == m_link && mb[f] == '0,
            "master clear loads the initial values");
    for (int i = 0; i < NOPS; i++) begin
      op = $urandom % 4;
      case (op)
        0: m_mb = m_ac;
        1: begin
             {m_cy, m_ac} = {1'b0, m_ac} + 1'b1;
             if (m_cy) n_carry++;
           end
        2: m_link = ~m_link;
        default: m_pc = m_pc + 1'b1;
      endcase
      // both forms: raise (4-phase) / toggle (2-phase) the request
      req[op][0] = 1'b1;
      req[op][1] = ~req[op][1];
      #(DELAY - 1);
      check(ack[op][0] == 1'b0 && ack[op][1] != req[op][1], "no acknowledge before the delay");
      #2;
      check(ack[op][0] == 1'b1 && ack[op][1] == req[op][1], "acknowledge after the delay");
      for (int f = 0; f < 2; f++)
        check(ac[f] == m_ac && mb[f] == m_mb && pc[f] == m_pc && link[f] == m_link &&
              carryout[f] == m_cy,
              $sformatf("form %0d op %0d: AC %h/%h MB %h/%h PC %h/%h L %b/%b C %b/%b", f, op,
                        ac[f], m_ac, mb[f], m_mb, pc[f], m_pc, link[f], m_link, carryout[f], m_cy));
      req[op][0] = 1'b0;
      #(DELAY + 1);
      check(ack[op][0] == 1'b0, "4-phase acknowledge returns to zero");
      for (int f = 0; f < 2; f++)
        check(ac[f] == m_ac && mb[f] == m_mb && pc[f] == m_pc && link[f] == m_link,
              "registers unchanged by the return to zero");
    end
    check(n_carry > 0, "AC + 1 overflowed at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
