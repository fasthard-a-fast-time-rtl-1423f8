// tb_fasthard: end-to-end test of the real-time unit at its full size
// (256 tasks, 8 priorities, 8 interrupt lines, 1000-cycle tick).
//
// The testbench plays the CPU. It runs the service-call sequence (block
// task switches, write parameters, set the CALL_SVC bit, wait for HS_SVC,
// read RETURN_DATA, clear CALL_SVC, wait for HS_SVC to fall, unblock) and
// the task-switch interrupt routine (set HS_TSW, read NEXT_TASK_ID, clear
// HS_TSW). A scripted story of tasks 0 (idle, priority 7), 5 (priority 3),
// 6 (priority 1) and 7 (priority 3) exercises every service call and checks
// each task switch, each return word and the tick at which each delay,
// period and time-out ends. Each kernel mechanism that happens is counted;
// one that never happens is a failure.
`timescale 1ns/1ps
module tb_fasthard;
  import fasthard_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        cs, rw_n, irq_cpu;
  logic [2:0]  adr;
  logic [15:0] wdata, rdata, now;
  logic [7:0]  irq_external, exec_tid;
  int checks = 0, failures = 0;
  int cur = 0;                 // task the CPU runs

  fasthard dut (.clk, .rst_n, .cs, .rw_n, .adr, .wdata, .rdata, .irq_cpu,
                .irq_external, .exec_tid, .now);

  always #5 clk = ~clk;

  // ---- mechanism counters
  typedef enum int {M_PREEMPT, M_BLOCKED_SWITCH, M_EQUAL_PRIO, M_IDLE_SWITCH,
                    M_DELAY, M_PERIOD, M_MISSED, M_PERIOD_OFF, M_IRQ_WAKE,
                    M_IRQ_DROPPED, M_IRQ_TIMEOUT, M_RDV_DIRECT, M_RDV_QUEUED,
                    M_CALL_TIMEOUT, M_ACCEPT_TIMEOUT, M_COMPLETE, M_TERMINATE,
                    M_REFUSED, M_NUM} mech_e;
  int mech [M_NUM];

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // IRQ_CPU may not rise while the CPU blocks task switches
  logic irq_q = 0;
  always @(posedge clk) begin
    if (rst_n && irq_cpu && !irq_q && dut.u_bus.block_tsw) begin
      failures++;
      $display("IRQ_CPU raised while BLOCK_TSW is set");
    end
    irq_q <= irq_cpu;
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%0t %s: got %0d (0x%0h) expected %0d (0x%0h)", $time, what, got, got, exp, exp);
    end
  endtask

  // ---- CPU bus
  task automatic bus_wr(input logic [2:0] a, input logic [15:0] d);
    @(negedge clk); cs = 1; rw_n = 0; adr = a; wdata = d;
    @(negedge clk); cs = 0; rw_n = 1;
  endtask

  task automatic bus_rd(input logic [2:0] a, output logic [15:0] d);
    @(negedge clk); cs = 1; rw_n = 1; adr = a; #1 d = rdata;
    @(negedge clk); cs = 0;
  endtask

  // ---- one service call; returns the return word and the HS_SVC polls
  task automatic svc(input int bitnr, input int n, input int p0, input int p1,
                     input int p2, input int p3, output int ret, output int polls,
                     input bit keep_block = 0);
    logic [15:0] d;
    int p [4];
    p[0] = p0; p[1] = p1; p[2] = p2; p[3] = p3;
    bus_wr(A_BLOCK_TSW, 16'd1);
    for (int i = 0; i < n; i++) bus_wr(A_PARAMETER_DATA, 16'(p[i]));
    bus_wr(A_CALL_SVC, 16'(1 << bitnr));
    polls = 0;
    do begin
      bus_rd(A_HS_SVC, d);
      polls++;
    end while (d[0] == 1'b0 && polls < 1000);
    bus_rd(A_RETURN_DATA, d);
    ret = int'(d);
    bus_wr(A_CALL_SVC, 16'd0);
    do bus_rd(A_HS_SVC, d); while (d[0] == 1'b1);
    if (!keep_block) bus_wr(A_BLOCK_TSW, 16'd0);
    if (bitnr != B_ACCEPT) chk("HS_SVC at first poll", polls, 1);
    else begin
      checks++;
      if (polls > 140) begin failures++; $display("ACCEPT took %0d polls", polls); end
    end
  endtask

  // ---- task-switch interrupt routine; waits up to `maxcyc` for IRQ_CPU
  task automatic switch_to(input int exp, input int maxcyc, input string why);
    logic [15:0] d;
    int n = 0;
    while (!irq_cpu && n < maxcyc) begin @(negedge clk); n++; end
    checks++;
    if (!irq_cpu) begin
      failures++;
      $display("%0t no task switch (%s), expected task %0d", $time, why, exp);
      return;
    end
    bus_wr(A_HS_TSW, 16'd1);             // acknowledge
    @(negedge clk);
    chk("IRQ_CPU dropped", irq_cpu, 0);
    repeat (3) @(negedge clk);           // save registers to the old TCB
    bus_rd(A_NEXT_TASK_ID, d);
    chk({"NEXT_TASK_ID ", why}, d, exp);
    repeat (3) @(negedge clk);           // load registers from the new TCB
    bus_wr(A_HS_TSW, 16'd0);
    repeat (2) @(negedge clk);
    chk({"executing ", why}, exec_tid, exp);
    cur = exp;
    if (exp == 0) mech[M_IDLE_SWITCH]++;
  endtask

  task automatic no_switch(input int cycles, input string why);
    int seen = 0;
    repeat (cycles) begin @(negedge clk); if (irq_cpu) seen = 1; end
    chk({"no switch ", why}, seen, 0);
  endtask

  task automatic read_ret(output int r);
    logic [15:0] d;
    bus_rd(A_RETURN_DATA, d);
    r = int'(d);
  endtask

  task automatic wait_tick(input int t);
    while (int'(now) < t) @(negedge clk);
  endtask

  int r, polls, t0, tw;
  logic [15:0] d;

  initial begin
    cs = 0; rw_n = 1; adr = 0; wdata = 0; irq_external = 0;
    for (int i = 0; i < M_NUM; i++) mech[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    chk("reset: task 0 executes", exec_tid, 0);
    no_switch(50, "after reset");

    // ---- activation and preemption
    svc(B_ACTIVATE, 3, 5, 3, 16'h1000, 0, r, polls);
    chk("ACTIVATE 5", r, RET_OK);
    switch_to(5, 20, "preempt idle by 5");
    mech[M_PREEMPT]++;
    svc(B_ACTIVATE, 3, 5, 3, 16'h1000, 0, r, polls);
    chk("ACTIVATE active task refused", r, RET_ERROR);
    svc(B_ACTIVATE, 3, 9, 8, 16'h1000, 0, r, polls);
    chk("ACTIVATE bad priority refused", r, RET_ERROR);
    mech[M_REFUSED]++;

    // ---- BLOCK_TSW holds a preemption back
    svc(B_ACTIVATE, 3, 6, 1, 16'h2000, 0, r, polls, 1);
    chk("ACTIVATE 6", r, RET_OK);
    no_switch(2000, "while BLOCK_TSW set");
    bus_rd(A_BLOCK_TSW, d);
    chk("BLOCK_TSW reads back (ALREADY_OFF)", d, 1);
    bus_wr(A_BLOCK_TSW, 16'd0);
    switch_to(6, 20, "6 preempts 5 after unblock");
    mech[M_BLOCKED_SWITCH]++;
    mech[M_PREEMPT]++;

    // ---- relative delay
    t0 = int'(now);
    svc(B_RELATIVE_DELAY, 1, 3, 0, 0, 0, r, polls);
    switch_to(5, 20, "6 delayed");
    switch_to(6, 5000, "delay ends");
    chk("delay ends at its tick", now, t0 + 3);
    read_ret(r);
    chk("delay return", r, RET_OK);
    mech[M_DELAY]++;

    // ---- periodic start and missed deadlines
    t0 = int'(now);
    svc(B_INIT_PERIOD_TIME, 1, 4, 0, 0, 0, r, polls);
    chk("INIT_PERIOD_TIME", r, RET_OK);
    svc(B_WAIT_NEXT_PERIOD, 0, 0, 0, 0, 0, r, polls);
    switch_to(5, 20, "6 waits for period");
    switch_to(6, 6000, "period start");
    chk("first release tick", now, t0 + 4);
    read_ret(r);
    chk("no missed period", r, 0);
    mech[M_PERIOD]++;
    wait_tick(t0 + 13);                  // 6 overruns two releases
    svc(B_WAIT_NEXT_PERIOD, 0, 0, 0, 0, 0, r, polls);
    switch_to(5, 20, "6 waits again");
    switch_to(6, 5000, "period start after overrun");
    chk("release after overrun", now, t0 + 16);
    read_ret(r);
    chk("two missed periods", r, 2);
    if (r == 2) mech[M_MISSED]++;
    svc(B_OFF_PERIOD_START, 0, 0, 0, 0, 0, r, polls);
    chk("OFF_PERIOD_START", r, RET_OK);
    svc(B_OFF_PERIOD_START, 0, 0, 0, 0, 0, r, polls);
    chk("OFF_PERIOD_START already off", r, 1);
    svc(B_WAIT_NEXT_PERIOD, 0, 0, 0, 0, 0, r, polls);
    chk("WAIT_FOR_NEXT_PERIOD without period", r, RET_ERROR);
    no_switch(5000, "no period");
    mech[M_PERIOD_OFF]++;

    // ---- external interrupts
    svc(B_WAIT_IRQ_EXTERNAL, 2, 2, 0, 0, 0, r, polls);
    switch_to(5, 20, "6 waits for IRQ 2");
    @(negedge clk); irq_external = 8'h08;     // line 3: nobody waits
    repeat (4) @(negedge clk); irq_external = 0;
    no_switch(300, "interrupt without waiter");
    mech[M_IRQ_DROPPED]++;
    @(negedge clk); irq_external = 8'h04;
    repeat (4) @(negedge clk); irq_external = 0;
    switch_to(6, 10, "IRQ 2 wakes 6");
    read_ret(r);
    chk("IRQ return", r, RET_OK);
    mech[M_IRQ_WAKE]++;
    t0 = int'(now);
    svc(B_WAIT_IRQ_EXTERNAL, 2, 4, 2, 0, 0, r, polls);
    switch_to(5, 20, "6 waits for IRQ 4");
    switch_to(6, 4000, "IRQ wait times out");
    chk("IRQ time-out tick", now, t0 + 2);
    read_ret(r);
    chk("IRQ time-out return", r, RET_TIMEOUT);
    mech[M_IRQ_TIMEOUT]++;
    @(negedge clk); irq_external = 8'h10;     // late interrupt: ignored
    repeat (4) @(negedge clk); irq_external = 0;
    no_switch(100, "late interrupt");
    svc(B_WAIT_IRQ_EXTERNAL, 2, 9, 0, 0, 0, r, polls);
    chk("bad IRQ number refused", r, RET_ERROR);

    // ---- rendezvous: callee accepts first
    svc(B_ACCEPT, 3, 1, 16'hAAAA, 0, 0, r, polls);
    switch_to(5, 20, "6 accepts entry 1");
    svc(B_CALL, 4, 1, 16'h1234, 6, 0, r, polls);
    chk("CALL return", r, RET_OK);
    switch_to(6, 20, "call wakes acceptor");
    read_ret(r);
    chk("ACCEPT returns caller id", r, 5);
    mech[M_RDV_DIRECT]++;
    chk("caller in rendezvous", int'(dut.u_kernel.st[5]), int'(TS_RENDEZVOUS));
    svc(B_COMPLETE, 0, 0, 0, 0, 0, r, polls);
    chk("COMPLETE", r, RET_OK);
    no_switch(100, "6 keeps CPU after COMPLETE");
    mech[M_COMPLETE]++;

    // ---- rendezvous: caller waits in the call queue
    t0 = int'(now);
    svc(B_RELATIVE_DELAY, 1, 3, 0, 0, 0, r, polls);
    switch_to(5, 20, "6 delayed");
    read_ret(r);
    chk("caller's return after COMPLETE", r, RET_OK);
    svc(B_CALL, 4, 2, 16'h5678, 6, 0, r, polls);
    switch_to(0, 20, "5 queued on entry 2");
    switch_to(6, 5000, "delay of 6 ends");
    svc(B_ACCEPT, 3, 2, 16'hAAAA, 0, 0, r, polls);
    chk("ACCEPT finds queued caller", r, 5);
    mech[M_RDV_QUEUED]++;
    no_switch(100, "accept of a queued call does not block");
    svc(B_COMPLETE, 0, 0, 0, 0, 0, r, polls);
    chk("COMPLETE 2", r, RET_OK);
    mech[M_COMPLETE]++;

    // ---- call time-out
    svc(B_RELATIVE_DELAY, 1, 4, 0, 0, 0, r, polls);
    switch_to(5, 20, "6 delayed 4");
    t0 = int'(now);
    svc(B_CALL, 4, 3, 16'h9abc, 6, 1, r, polls);
    switch_to(0, 20, "5 calls with time-out");
    switch_to(5, 3000, "call times out");
    chk("call time-out tick", now, t0 + 1);
    read_ret(r);
    chk("call time-out return", r, RET_TIMEOUT);
    mech[M_CALL_TIMEOUT]++;
    switch_to(6, 5000, "6 wakes and preempts 5");
    mech[M_PREEMPT]++;

    // ---- accept time-out, refused calls
    t0 = int'(now);
    svc(B_ACCEPT, 3, 0, 16'hAAAA, 2, 0, r, polls);
    switch_to(5, 300, "6 accepts with time-out");
    switch_to(6, 4000, "accept times out");
    chk("accept time-out tick", now, t0 + 2);
    read_ret(r);
    chk("accept time-out return", r, RET_TIMEOUT);
    mech[M_ACCEPT_TIMEOUT]++;
    svc(B_COMPLETE, 0, 0, 0, 0, 0, r, polls);
    chk("COMPLETE without rendezvous", r, RET_ERROR);
    svc(B_CALL, 4, 0, 0, 6, 0, r, polls);
    chk("CALL to itself", r, RET_ERROR);
    svc(16'd12, 0, 0, 0, 0, 0, r, polls);
    chk("unknown service call", r, RET_ERROR);

    // ---- terminate and re-activate
    svc(B_TERMINATE, 0, 0, 0, 0, 0, r, polls);
    switch_to(5, 20, "6 terminated");
    chk("6 dormant", int'(dut.u_kernel.st[6]), int'(TS_DORMANT));
    mech[M_TERMINATE]++;
    svc(B_ACTIVATE, 3, 6, 1, 16'h2000, 0, r, polls);
    chk("re-ACTIVATE 6", r, RET_OK);
    switch_to(6, 20, "6 again");
    svc(B_TERMINATE, 0, 0, 0, 0, 0, r, polls);
    switch_to(5, 20, "6 terminated again");

    // ---- equal priority: no preemption, FIFO order
    svc(B_ACTIVATE, 3, 7, 3, 16'h3000, 0, r, polls);
    no_switch(200, "equal priority");
    mech[M_EQUAL_PRIO]++;
    svc(B_RELATIVE_DELAY, 1, 2, 0, 0, 0, r, polls);
    switch_to(7, 20, "5 delayed, 7 runs");
    svc(B_TERMINATE, 0, 0, 0, 0, 0, r, polls);
    switch_to(0, 20, "7 terminated");
    switch_to(5, 3000, "5 wakes");

    for (int i = 0; i < M_NUM; i++) begin
      checks++;
      if (mech[i] == 0) begin
        failures++;
        $display("mechanism %s never happened", mech_e'(i));
      end
    end
    $display("mechanisms: preempt=%0d blocked=%0d delay=%0d period=%0d missed=%0d irq=%0d irq_to=%0d rdv=%0d/%0d call_to=%0d accept_to=%0d complete=%0d terminate=%0d idle=%0d",
             mech[M_PREEMPT], mech[M_BLOCKED_SWITCH], mech[M_DELAY], mech[M_PERIOD],
             mech[M_MISSED], mech[M_IRQ_WAKE], mech[M_IRQ_TIMEOUT], mech[M_RDV_DIRECT],
             mech[M_RDV_QUEUED], mech[M_CALL_TIMEOUT], mech[M_ACCEPT_TIMEOUT],
             mech[M_COMPLETE], mech[M_TERMINATE], mech[M_IDLE_SWITCH]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
