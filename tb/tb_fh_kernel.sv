// tb_fh_kernel: drives the kernel's ports directly (no queues, timers or
// run block attached) and checks, cycle by cycle, the commands it issues
// for each service call, task switch and wake-up: ready-queue pushes and
// pops, timer and interrupt commands, return words, the one-cycle service
// time of ordinary calls and the NTASKS-cycle bound of ACCEPT's search.
`timescale 1ns/1ps
module tb_fh_kernel;
  import fasthard_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [15:0] call_svc, return_data;
  logic [15:0] params [4];
  logic block_tsw, hs_svc;
  logic [7:0] run_tid;
  logic rq_push, rq_pop; logic [2:0] rq_push_prio; logic [7:0] rq_push_tid, rq_head_tid;
  logic sch_allowed, sch_run_active, sch_do_switch; logic [2:0] sch_run_prio;
  logic run_start, run_busy, run_done, run_done_ack; logic [7:0] run_next;
  logic tmo_cmd_valid, tmo_cmd_arm, tmo_exp_valid, tmo_exp_ack;
  logic [7:0] tmo_cmd_tid, tmo_exp_tid; logic [15:0] tmo_cmd_delay;
  logic per_cmd_valid, per_cmd_on, per_rel_valid, per_rel_ack;
  logic [7:0] per_cmd_tid, per_rel_tid; logic [15:0] per_cmd_period;
  logic irq_wait_valid, irq_cancel_valid, irq_evt_valid, irq_evt_ack;
  logic [2:0] irq_wait_irq, irq_cancel_irq; logic [7:0] irq_wait_tid, irq_evt_tid;
  logic [7:0] irq_waiting;
  int checks = 0, failures = 0;

  fh_kernel #(.NTASKS(256), .NPRIO(8), .NIRQ(8), .DW(16), .NPARAM(4), .TW(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%0t %s: got %0d (0x%0h) expected %0d (0x%0h)", $time, what, got, got, exp, exp);
    end
  endtask

  // outputs sampled in the decision cycle
  typedef struct {
    bit push; int push_prio, push_tid; bit pop;
    bit tmo; bit tmo_arm; int tmo_tid, tmo_delay;
    bit per; bit per_on; int per_tid, per_period;
    bit iw; int iw_irq, iw_tid; bit ic; int ic_irq;
    bit start; int next; bit done_ack; bit tack, pack, iack;
  } snap_t;
  snap_t s;

  task automatic sample();
    s.push = rq_push; s.push_prio = rq_push_prio; s.push_tid = rq_push_tid; s.pop = rq_pop;
    s.tmo = tmo_cmd_valid; s.tmo_arm = tmo_cmd_arm; s.tmo_tid = tmo_cmd_tid;
    s.tmo_delay = tmo_cmd_delay;
    s.per = per_cmd_valid; s.per_on = per_cmd_on; s.per_tid = per_cmd_tid;
    s.per_period = per_cmd_period;
    s.iw = irq_wait_valid; s.iw_irq = irq_wait_irq; s.iw_tid = irq_wait_tid;
    s.ic = irq_cancel_valid; s.ic_irq = irq_cancel_irq;
    s.start = run_start; s.next = run_next; s.done_ack = run_done_ack;
    s.tack = tmo_exp_ack; s.pack = per_rel_ack; s.iack = irq_evt_ack;
  endtask

  // service call; returns the cycles until HS_SVC
  task automatic svc(input int bitnr, input int p0, input int p1, input int p2,
                     input int p3, output int ret, output int cycles);
    @(negedge clk);
    params[0] = 16'(p0); params[1] = 16'(p1); params[2] = 16'(p2); params[3] = 16'(p3);
    call_svc = 16'(1 << bitnr);
    cycles = 0;
    #1 sample();
    while (!hs_svc && cycles < 400) begin
      @(posedge clk); #1;
      cycles++;
      if (!hs_svc) sample();
    end
    ret = return_data;
    @(negedge clk); call_svc = 0;
    @(negedge clk);
    chk("HS_SVC falls", hs_svc, 0);
  endtask

  // task switch to `tid` (head of the chosen ready queue)
  task automatic switch_to(input int tid, input bit old_pushed, input int old_tid,
                           input int old_prio);
    @(negedge clk);
    sch_do_switch = 1; rq_head_tid = 8'(tid);
    #1 sample();
    chk("run_start", s.start, 1); chk("run_next", s.next, tid); chk("pop", s.pop, 1);
    @(negedge clk);
    sch_do_switch = 0; run_busy = 1;
    #1 chk("no switch while busy", sch_allowed, 0);
    run_done = 1;
    #1 sample();
    chk("done_ack", s.done_ack, 1);
    chk("old task pushed", s.push, old_pushed);
    if (old_pushed) begin
      chk("old task id", s.push_tid, old_tid);
      chk("old task prio", s.push_prio, old_prio);
    end
    @(negedge clk);
    run_done = 0; run_busy = 0;
    chk("run_tid", run_tid, tid);
    chk("new task executes", sch_run_active, 1);
  endtask

  int r, cyc;

  initial begin
    call_svc = 0; block_tsw = 0; rq_head_tid = 0; sch_do_switch = 0;
    run_busy = 0; run_done = 0; tmo_exp_valid = 0; tmo_exp_tid = 0;
    per_rel_valid = 0; per_rel_tid = 0; irq_waiting = 0; irq_evt_valid = 0; irq_evt_tid = 0;
    for (int i = 0; i < 4; i++) params[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk("reset run_tid", run_tid, 0);
    chk("reset: idle task 0 counts as preemptible", sch_run_active, 0);
    chk("reset prio", sch_run_prio, 7);
    chk("allowed", sch_allowed, 1);
    block_tsw = 1; #1 chk("blocked", sch_allowed, 0); block_tsw = 0;

    // ACTIVATE
    svc(B_ACTIVATE, 5, 3, 16'h1000, 0, r, cyc);
    chk("ACTIVATE cycles", cyc, 1);
    chk("ACTIVATE push", s.push, 1); chk("push tid", s.push_tid, 5); chk("push prio", s.push_prio, 3);
    chk("ACTIVATE ret", r, RET_OK);
    svc(B_ACTIVATE, 5, 3, 0, 0, r, cyc);
    chk("second ACTIVATE refused", r, RET_ERROR); chk("no push", s.push, 0);
    svc(B_ACTIVATE, 300, 3, 0, 0, r, cyc);
    chk("bad task refused", r, RET_ERROR);

    switch_to(5, 1, 0, 7);
    chk("prio of 5", sch_run_prio, 3);

    // RELATIVE_DELAY and its expiry
    svc(B_RELATIVE_DELAY, 7, 0, 0, 0, r, cyc);
    chk("delay arms timer", s.tmo, 1); chk("arm", s.tmo_arm, 1);
    chk("arm tid", s.tmo_tid, 5); chk("arm delay", s.tmo_delay, 7);
    chk("5 no longer executes", sch_run_active, 0);
    @(negedge clk); tmo_exp_valid = 1; tmo_exp_tid = 5;
    #1 sample();
    chk("expiry ack", s.tack, 1); chk("expiry push", s.push, 1); chk("expiry tid", s.push_tid, 5);
    @(negedge clk); tmo_exp_valid = 1; tmo_exp_tid = 9;   // stale: task 9 dormant
    #1 sample();
    chk("stale ack", s.tack, 1); chk("stale no push", s.push, 0);
    @(negedge clk); tmo_exp_valid = 0;
    switch_to(5, 0, 0, 0);

    // job order: a service call goes before a time-out
    @(negedge clk);
    tmo_exp_valid = 1; tmo_exp_tid = 9;
    call_svc = 16'(1 << B_ACTIVATE); params[0] = 16'd7; params[1] = 16'd2;
    #1 sample();
    chk("svc first", s.push_tid, 7); chk("time-out waits", s.tack, 0);
    @(negedge clk);
    #1 sample();
    chk("time-out next", s.tack, 1);
    @(negedge clk); call_svc = 0; tmo_exp_valid = 0;
    @(negedge clk);

    // ACCEPT without caller: full search, then waits with time-out
    svc(B_ACCEPT, 1, 16'hAAAA, 20, 0, r, cyc);
    chk("ACCEPT search length", cyc, 257);
    chk("accept time-out armed", s.tmo, 1); chk("accept tmo tid", s.tmo_tid, 5);
    chk("accept tmo delay", s.tmo_delay, 20);
    chk("5 waits", sch_run_active, 0);
    switch_to(7, 0, 0, 0);
    // CALL from 7: the callee is accepting -> rendezvous at once
    svc(B_CALL, 1, 16'h1234, 5, 0, r, cyc);
    chk("CALL cycles", cyc, 1);
    chk("callee pushed", s.push, 1); chk("callee id", s.push_tid, 5); chk("callee prio", s.push_prio, 3);
    chk("callee timer disarmed", s.tmo, 1); chk("disarm", s.tmo_arm, 0);
    chk("7 waits for COMPLETE", sch_run_active, 0);
    switch_to(5, 0, 0, 0);
    chk("ACCEPT returns caller", return_data, 7);
    svc(B_COMPLETE, 0, 0, 0, 0, r, cyc);
    chk("COMPLETE ok", r, RET_OK); chk("caller pushed", s.push_tid, 7); chk("caller prio", s.push_prio, 2);
    svc(B_COMPLETE, 0, 0, 0, 0, r, cyc);
    chk("second COMPLETE refused", r, RET_ERROR);

    // periodic start
    svc(B_INIT_PERIOD_TIME, 6, 0, 0, 0, r, cyc);
    chk("period cmd", s.per, 1); chk("period on", s.per_on, 1); chk("period value", s.per_period, 6);
    @(negedge clk); per_rel_valid = 1; per_rel_tid = 5;     // 5 executes: missed
    #1 sample(); chk("release ack", s.pack, 1); chk("missed: no push", s.push, 0);
    @(negedge clk); per_rel_valid = 0;
    svc(B_WAIT_NEXT_PERIOD, 0, 0, 0, 0, r, cyc);
    chk("5 waits for period", sch_run_active, 0);
    @(negedge clk); per_rel_valid = 1; per_rel_tid = 5;
    #1 sample(); chk("release push", s.push, 1); chk("release tid", s.push_tid, 5);
    @(negedge clk); per_rel_valid = 0;
    switch_to(5, 0, 0, 0);
    chk("missed count returned", return_data, 1);
    svc(B_OFF_PERIOD_START, 0, 0, 0, 0, r, cyc);
    chk("off", r, RET_OK); chk("off cmd", s.per, 1); chk("off value", s.per_on, 0);
    svc(B_OFF_PERIOD_START, 0, 0, 0, 0, r, cyc);
    chk("already off", r, 1);

    // interrupts
    irq_waiting = 8'h08;
    svc(B_WAIT_IRQ_EXTERNAL, 3, 10, 0, 0, r, cyc);
    chk("busy line refused", r, RET_ERROR); chk("no wait cmd", s.iw, 0);
    irq_waiting = 8'h00;
    svc(B_WAIT_IRQ_EXTERNAL, 3, 10, 0, 0, r, cyc);
    chk("wait cmd", s.iw, 1); chk("wait irq", s.iw_irq, 3); chk("wait tid", s.iw_tid, 5);
    chk("irq tmo armed", s.tmo, 1); chk("irq tmo delay", s.tmo_delay, 10);
    @(negedge clk); tmo_exp_valid = 1; tmo_exp_tid = 5;   // time-out first
    #1 sample();
    chk("irq time-out push", s.push, 1); chk("irq cancel", s.ic, 1); chk("cancel line", s.ic_irq, 3);
    @(negedge clk); tmo_exp_valid = 0;
    switch_to(5, 0, 0, 0);
    chk("time-out return", return_data, RET_TIMEOUT);
    svc(B_WAIT_IRQ_EXTERNAL, 2, 0, 0, 0, r, cyc);
    chk("no time-out armed", s.tmo, 0);
    @(negedge clk); irq_evt_valid = 1; irq_evt_tid = 5;
    #1 sample();
    chk("irq ack", s.iack, 1); chk("irq push", s.push, 1); chk("irq disarm", s.tmo, 1);
    @(negedge clk); irq_evt_valid = 0;
    switch_to(5, 0, 0, 0);
    chk("irq return", return_data, RET_OK);

    // TERMINATE
    svc(B_TERMINATE, 0, 0, 0, 0, r, cyc);
    chk("terminate stops period", s.per, 1);
    chk("5 stopped", sch_run_active, 0);
    svc(B_ACTIVATE, 5, 4, 0, 0, r, cyc);
    chk("terminated task cannot activate itself", r, RET_ERROR);
    switch_to(7, 0, 0, 0);
    svc(B_ACTIVATE, 5, 4, 0, 0, r, cyc);
    chk("reactivate dormant", r, RET_OK); chk("reactivated prio", s.push_prio, 4);

    // call queue order: 9 calls before 8, ACCEPT takes 9 although 8 < 9
    svc(B_ACTIVATE, 9, 5, 0, 0, r, cyc);
    svc(B_ACTIVATE, 8, 5, 0, 0, r, cyc);
    svc(B_RELATIVE_DELAY, 5, 0, 0, 0, r, cyc);
    switch_to(9, 0, 0, 0);
    svc(B_CALL, 2, 0, 7, 0, r, cyc);
    chk("9 queued", sch_run_active, 0);
    switch_to(8, 0, 0, 0);
    svc(B_CALL, 2, 0, 7, 0, r, cyc);
    chk("8 queued", sch_run_active, 0);
    @(negedge clk); tmo_exp_valid = 1; tmo_exp_tid = 7;
    @(negedge clk); tmo_exp_valid = 0;
    switch_to(7, 0, 0, 0);
    svc(B_ACCEPT, 2, 0, 0, 0, r, cyc);
    chk("ACCEPT with callers: full search", cyc, 257);
    chk("oldest caller first", r, 9);
    chk("caller timer disarmed", s.tmo, 1); chk("disarmed task", s.tmo_tid, 9);
    chk("acceptor keeps running", sch_run_active, 1);
    svc(B_COMPLETE, 0, 0, 0, 0, r, cyc);
    chk("complete 9", s.push_tid, 9);
    svc(B_ACCEPT, 2, 0, 0, 0, r, cyc);
    chk("then 8", r, 8);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
