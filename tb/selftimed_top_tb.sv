`timescale 1ns / 1ps
// End-to-end test of the five control segments of selftimed_top.
//
// The testbench plays the environment of every segment: it starts the
// segment with a 4-phase (or 2-phase) request, answers the memory write
// and the F -> IX work, and takes the output handshake. A reference model
// of the registers (AC, MB, PC, LINK, CARRYOUT) predicts the effect of each
// pass and the data written to memory. The accumulator starts two below
// overflow so that both outcomes of the CARRYOUT branch occur, and SKIP
// alternates so that both branches of the SKIP select and both inputs of
// the merge are used. Every mechanism is counted, and one that never
// occurred is a failure. The time of each 4-phase pass is recorded, and the
// ordering of the styles is checked: narrow fastest and broad slowest of
// the flat styles, the hierarchical style no faster than flat broad, and
// the 2-phase segment (start to F -> IX request) faster than every 4-phase
// one (start to output request).
// The hierarchical segment must acknowledge its input only after its
// output handshake, the flat ones before their output request.
module selftimed_top_tb;
  import selftimed_pkg::*;

  localparam int unsigned W    = WORD_W;
  localparam int unsigned NOPS = 6;

  logic                mc_n;
  logic [W-1:0]        ac_init, pc_init;
  logic                link_init;
  logic [3:0]          ir1, ia1, or4, oa4, wr4, wa4, mem_req, mem_ack, skip, link, carryout;
  logic [3:0][W-1:0]   mem_data, ac, mb, pc;
  logic                r1_2ph, r4_2ph, mem_req_2ph, mem_ack_2ph, skip_2ph, link_2ph, carryout_2ph;
  logic [W-1:0]        mem_data_2ph, ac_2ph, mb_2ph, pc_2ph;

  selftimed_top dut (.*);

  int checks = 0, failures = 0;
  bit started = 1'b0;

  // mechanism counters
  int n_skip_t [5], n_skip_f [5], n_carry_t [5], n_carry_f [5];
  int n_mem [5], n_fx [5];
  logic [W-1:0] mem_last [5];
  longint t_total [4];
  longint t_lat [5];   // start request to output request, summed over passes
  int n_ia_late = 0, n_ia_early = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // memory and F -> IX responders, 4-phase
  for (genvar k = 0; k < 4; k++) begin : g_resp
    always begin
      wait (started && mem_req[k]);
      mem_last[k] = mem_data[k];
      n_mem[k]++;
      #4 mem_ack[k] = 1'b1;
      wait (!mem_req[k]);
      #4 mem_ack[k] = 1'b0;
    end
    always begin
      wait (started && wr4[k]);
      n_fx[k]++;
      #3 wa4[k] = 1'b1;
      wait (!wr4[k]);
      #3 wa4[k] = 1'b0;
    end
  end

  // events on the segment outputs (a glitch would show as an extra event)
  int n_or4 [4], n_r4 = 0;
  for (genvar k = 0; k < 4; k++) begin : g_ev
    always @(posedge or4[k]) if (started) n_or4[k]++;
    // input acknowledge: after the output handshake only when hierarchical
    always @(posedge ia1[k]) if (started) begin
      if (oa4[k]) n_ia_late++; else n_ia_early++;
      check(oa4[k] == (k == 3), $sformatf("seg%0d input acknowledge timing", k));
    end
  end
  always @(r4_2ph) if (started) n_r4++;

  // memory responder, 2-phase
  always @(mem_req_2ph) begin
    if (started) begin
      mem_last[4] = mem_data_2ph;
      n_mem[4]++;
      #4 mem_ack_2ph = mem_req_2ph;
    end
  end

  // reference model state per segment
  logic [W-1:0] m_ac [5], m_mb [5], m_pc [5];
  logic         m_link [5], m_cy [5];

  task automatic model_step(input int k, input bit sk);
    m_mb[k] = m_ac[k];
    {m_cy[k], m_ac[k]} = {1'b0, m_ac[k]} + 1'b1;
    if (m_cy[k]) n_carry_t[k]++;
    else begin
      n_carry_f[k]++;
      m_link[k] = ~m_link[k];
    end
    if (sk) begin
      m_pc[k] = m_pc[k] + 1'b1;
      n_skip_t[k]++;
    end else n_skip_f[k]++;
  endtask

  task automatic run4(input int k, input bit sk);
    longint t0;
    int mem0, fx0, or0;
    or0  = n_or4[k];
    mem0 = n_mem[k];
    fx0  = n_fx[k];
    skip[k] = sk;
    t0 = $time;
    fork
      begin
        ir1[k] = 1'b1;
        wait (ia1[k]);
        #1 ir1[k] = 1'b0;
        wait (!ia1[k]);
      end
      begin
        wait (or4[k]);
        t_lat[k] += $time - t0;
        oa4[k] = 1'b1;
        wait (!or4[k]);
        oa4[k] = 1'b0;
      end
    join
    t_total[k] += $time - t0;
    #2;
    model_step(k, sk);
    check(n_mem[k] == mem0 + 1, $sformatf("seg%0d one memory write", k));
    check(n_fx[k] == fx0 + 1, $sformatf("seg%0d one F->IX", k));
    check(n_or4[k] == or0 + 1, $sformatf("seg%0d one output request", k));
    check(mem_last[k] == m_mb[k], $sformatf("seg%0d mem data %h exp %h", k, mem_last[k], m_mb[k]));
    check(mb[k] == m_mb[k], $sformatf("seg%0d MB %h exp %h", k, mb[k], m_mb[k]));
    check(ac[k] == m_ac[k], $sformatf("seg%0d AC %h exp %h", k, ac[k], m_ac[k]));
    check(pc[k] == m_pc[k], $sformatf("seg%0d PC %h exp %h", k, pc[k], m_pc[k]));
    check(link[k] == m_link[k], $sformatf("seg%0d LINK %b exp %b", k, link[k], m_link[k]));
    check(carryout[k] == m_cy[k], $sformatf("seg%0d CARRYOUT %b exp %b", k, carryout[k], m_cy[k]));
  endtask

  task automatic run2(input bit sk);
    int mem0, r40;
    longint t0;
    mem0 = n_mem[4];
    r40 = n_r4;
    skip_2ph = sk;
    #1 r1_2ph = ~r1_2ph;
    t0 = $time;
    wait (n_r4 != r40);
    t_lat[4] += $time - t0;
    n_fx[4]++;
    #20;
    check(n_r4 == r40 + 1, "2ph one F->IX request event");
    model_step(4, sk);
    check(n_mem[4] == mem0 + 1, "2ph one memory write");
    check(mem_last[4] == m_mb[4], $sformatf("2ph mem data %h exp %h", mem_last[4], m_mb[4]));
    check(mb_2ph == m_mb[4], $sformatf("2ph MB %h exp %h", mb_2ph, m_mb[4]));
    check(ac_2ph == m_ac[4], $sformatf("2ph AC %h exp %h", ac_2ph, m_ac[4]));
    check(pc_2ph == m_pc[4], $sformatf("2ph PC %h exp %h", pc_2ph, m_pc[4]));
    check(link_2ph == m_link[4], $sformatf("2ph LINK %b exp %b", link_2ph, m_link[4]));
    check(carryout_2ph == m_cy[4], $sformatf("2ph CARRYOUT %b exp %b", carryout_2ph, m_cy[4]));
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mc_n = 1'b1;
    ac_init = 12'o7775;
    pc_init = 12'o0200;
    link_init = 1'b0;
    ir1 = '0; oa4 = '0; wa4 = '0; mem_ack = '0; skip = '0;
    r1_2ph = 1'b0; mem_ack_2ph = 1'b0; skip_2ph = 1'b0;
    for (int k = 0; k < 5; k++) begin
      m_ac[k] = ac_init; m_mb[k] = '0; m_pc[k] = pc_init;
      m_link[k] = link_init; m_cy[k] = 1'b0;
      n_skip_t[k] = 0; n_skip_f[k] = 0; n_carry_t[k] = 0; n_carry_f[k] = 0;
      n_mem[k] = 0; n_fx[k] = 0;
    end
    for (int k = 0; k < 5; k++) t_lat[k] = 0;
    for (int k = 0; k < 4; k++) begin
      t_total[k] = 0;
      n_or4[k] = 0;
    end
    #1 mc_n = 1'b0;
    #10 mc_n = 1'b1;
    #10 started = 1'b1;
    for (int k = 0; k < 4; k++)
      for (int i = 0; i < NOPS; i++) run4(k, i[0]);
    for (int i = 0; i < NOPS; i++) run2(i[0]);

    for (int k = 0; k < 5; k++) begin
      check(n_skip_t[k] > 0, $sformatf("seg%0d SKIP true path used", k));
      check(n_skip_f[k] > 0, $sformatf("seg%0d SKIP false path used", k));
      check(n_carry_t[k] > 0, $sformatf("seg%0d CARRYOUT true path used", k));
      check(n_carry_f[k] > 0, $sformatf("seg%0d CARRYOUT false path used", k));
      check(n_mem[k] == NOPS, $sformatf("seg%0d fork/join memory writes %0d", k, n_mem[k]));
      $display("seg%0d: skip T/F %0d/%0d carry T/F %0d/%0d mem %0d fx %0d",
               k, n_skip_t[k], n_skip_f[k], n_carry_t[k], n_carry_f[k], n_mem[k], n_fx[k]);
    end
    $display("4-phase pass times (ns, %0d passes): broad %0d weak-broad %0d narrow %0d hierarchical %0d",
             NOPS, t_total[0], t_total[1], t_total[2], t_total[3]);
    $display("input acknowledges before / after the output handshake: %0d / %0d",
             n_ia_early, n_ia_late);
    check(t_total[2] <= t_total[1] && t_total[1] <= t_total[0],
          "narrow <= weak-broad <= broad in time");
    check(t_total[0] <= t_total[3], "flat broad no slower than hierarchical");
    $display("start-to-output latency (ns, %0d passes): broad %0d weak-broad %0d narrow %0d hierarchical %0d 2-phase %0d",
             NOPS, t_lat[0], t_lat[1], t_lat[2], t_lat[3], t_lat[4]);
    check(t_lat[4] < t_lat[0] && t_lat[4] < t_lat[1] && t_lat[4] < t_lat[2] && t_lat[4] < t_lat[3],
          "2-phase faster than every 4-phase style");
    check(n_ia_late == NOPS && n_ia_early == 3 * NOPS, "early and late input acknowledges seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
