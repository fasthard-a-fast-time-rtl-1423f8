// tb_fasthard_load: the real-time unit at full load, with all 256 tasks in
// use at the default size.
//
// Task 0 activates tasks 1..255, task i at priority i % 8, with task
// switches held off. Then it lets them run. The CPU played here runs each
// task through three steps:
//   1. delay until a common tick T;
//   2. when woken, start a period of P ticks and wait for the next period;
//   3. when released, terminate.
// Checks:
//   - first runs come in priority order, FIFO within a priority, then task 0;
//   - all 255 delays end in tick T (task 0 holds switches off across T, so
//     every wake-up lands before the first switch);
//   - after T the tasks run in non-decreasing priority order, and within a
//     priority in the order the timer scan woke them (one wrap at most);
//   - every task is released exactly P ticks after its period started, with
//     no missed period;
//   - after all have terminated, every task is dormant and no release comes.
`timescale 1ns/1ps
module tb_fasthard_load;
  import fasthard_pkg::*;

  localparam int N = NTASKS;
  localparam int P = 60;             // period, ticks

  logic        clk = 0, rst_n = 0;
  logic        cs, rw_n, irq_cpu;
  logic [2:0]  adr;
  logic [15:0] wdata, rdata, now;
  logic [7:0]  irq_external, exec_tid;
  int checks = 0, failures = 0;

  fasthard dut (.clk, .rst_n, .cs, .rw_n, .adr, .wdata, .rdata, .irq_cpu,
                .irq_external, .exec_tid, .now);

  always #5 clk = ~clk;

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
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

  // ---- observe the task table: when each task woke and started a period
  task_state_e prev_st [N];
  int delay_wake [N];
  int rel_wake   [N];
  int per_start  [N];

  always @(posedge clk) begin
    for (int i = 0; i < N; i++) begin
      if (prev_st[i] == TS_DELAY && dut.u_kernel.st[i] == TS_READY)
        delay_wake[i] = int'(now);
      if (prev_st[i] == TS_PERIOD_WAIT && dut.u_kernel.st[i] == TS_READY)
        rel_wake[i] = int'(now);
      prev_st[i] = dut.u_kernel.st[i];
    end
    if (dut.per_cmd_valid && dut.per_cmd_on)
      per_start[dut.per_cmd_tid] = int'(now);
  end

  // ---- CPU bus
  task automatic bus_wr(input logic [2:0] a, input logic [15:0] d);
    @(negedge clk); cs = 1; rw_n = 0; adr = a; wdata = d;
    @(negedge clk); cs = 0; rw_n = 1;
  endtask

  task automatic bus_rd(input logic [2:0] a, output logic [15:0] d);
    @(negedge clk); cs = 1; rw_n = 1; adr = a; #1 d = rdata;
    @(negedge clk); cs = 0;
  endtask

  task automatic svc(input int bitnr, input int n, input int p0, input int p1,
                     input int p2, output int ret, input bit keep_block = 0);
    logic [15:0] d;
    int p [3];
    int polls = 0;
    p[0] = p0; p[1] = p1; p[2] = p2;
    bus_wr(A_BLOCK_TSW, 16'd1);
    for (int i = 0; i < n; i++) bus_wr(A_PARAMETER_DATA, 16'(p[i]));
    bus_wr(A_CALL_SVC, 16'(1 << bitnr));
    do begin bus_rd(A_HS_SVC, d); polls++; end while (d[0] == 1'b0 && polls < 1000);
    bus_rd(A_RETURN_DATA, d);
    ret = int'(d);
    bus_wr(A_CALL_SVC, 16'd0);
    do bus_rd(A_HS_SVC, d); while (d[0] == 1'b1);
    if (!keep_block) bus_wr(A_BLOCK_TSW, 16'd0);
    chk("HS_SVC at first poll", polls, 1);
  endtask

  // ---- task-switch interrupt routine; returns the new task, or -1
  task automatic take_switch(input int maxcyc, output int tid);
    logic [15:0] d;
    int n = 0;
    while (!irq_cpu && n < maxcyc) begin @(negedge clk); n++; end
    if (!irq_cpu) begin tid = -1; return; end
    bus_wr(A_HS_TSW, 16'd1);
    repeat (2) @(negedge clk);
    bus_rd(A_NEXT_TASK_ID, d);
    repeat (2) @(negedge clk);
    bus_wr(A_HS_TSW, 16'd0);
    repeat (2) @(negedge clk);
    tid = int'(d);
    chk("executing task matches NEXT_TASK_ID", exec_tid, tid);
  endtask

  int r, tid, t_start, T, pr_last, last_id, descents, bad, alive;
  int order [$];
  logic [15:0] d;

  initial begin
    cs = 0; rw_n = 1; adr = 0; wdata = 0; irq_external = 0;
    for (int i = 0; i < N; i++) begin
      prev_st[i] = TS_DORMANT; delay_wake[i] = -1; rel_wake[i] = -1; per_start[i] = -1;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    t_start = int'(now);
    T = t_start + 40;

    // ---- task 0 activates everyone with switches held off
    for (int i = 1; i < N; i++) begin
      svc(B_ACTIVATE, 3, i, i % NPRIO, 16'h1000 + i, r, 1);
      chk("ACTIVATE", r, RET_OK);
    end
    bad = 0;
    for (int i = 1; i < N; i++) if (dut.u_kernel.st[i] != TS_READY) bad++;
    chk("all 255 tasks ready", bad, 0);
    chk("no switch while held off", irq_cpu, 0);
    bus_wr(A_BLOCK_TSW, 16'd0);

    // ---- first runs: each task delays until tick T
    for (int p = 0; p < NPRIO; p++)
      for (int i = 1; i < N; i++)
        if (i % NPRIO == p) order.push_back(i);
    order.push_back(0);
    foreach (order[k]) begin
      take_switch(100, tid);
      chk("first-run order", tid, order[k]);
      if (tid > 0) svc(B_RELATIVE_DELAY, 1, T - int'(now), 0, 0, r);
    end
    checks++;
    if (int'(now) >= T - 2) begin
      failures++;
      $display("first runs ended at tick %0d, too late for T=%0d", now, T);
    end

    // ---- task 0 holds switches off across tick T
    bus_wr(A_BLOCK_TSW, 16'd1);
    while (int'(now) < T) @(negedge clk);
    repeat (600) @(negedge clk);
    bad = 0;
    for (int i = 1; i < N; i++)
      if (dut.u_kernel.st[i] != TS_READY || delay_wake[i] != T) bad++;
    chk("all delays ended in tick T", bad, 0);
    chk("task 0 still executing", exec_tid, 0);
    bus_wr(A_BLOCK_TSW, 16'd0);

    // ---- second runs: priority order; each starts a period and waits
    pr_last = 0; last_id = -1; descents = 0; bad = 0;
    for (int k = 0; k < N; k++) begin
      take_switch(100, tid);
      if (tid < 0) begin chk("switch after T", tid, 0); break; end
      if (k == N - 1) begin chk("idle task last", tid, 0); break; end
      checks++;
      if (tid == 0 || dut.u_kernel.pr[tid] < pr_last) begin
        failures++;
        $display("task %0d (priority %0d) out of order", tid, dut.u_kernel.pr[tid]);
      end
      if (dut.u_kernel.pr[tid] != pr_last) begin
        if (descents > 1) bad++;
        descents = 0; last_id = -1;
      end
      if (tid < last_id) descents++;
      pr_last = dut.u_kernel.pr[tid]; last_id = tid;
      bus_rd(A_RETURN_DATA, d);
      chk("delay return", d, RET_OK);
      svc(B_INIT_PERIOD_TIME, 1, P, 0, 0, r);
      chk("INIT_PERIOD_TIME", r, RET_OK);
      svc(B_WAIT_NEXT_PERIOD, 0, 0, 0, 0, r);
    end
    if (descents > 1) bad++;
    chk("FIFO in wake order within each priority", bad, 0);

    // ---- third runs: each release comes P ticks after the period started
    alive = N - 1;
    while (alive > 0) begin
      take_switch(2 * P * 1000, tid);
      if (tid < 0) begin chk("release came", alive, 0); break; end
      if (tid == 0) continue;
      chk("release tick", rel_wake[tid] - per_start[tid], P);
      bus_rd(A_RETURN_DATA, d);
      chk("no missed period", d, 0);
      svc(B_TERMINATE, 0, 0, 0, 0, r);
      alive--;
    end
    take_switch(100, tid);
    chk("back to idle", tid, 0);

    // ---- terminated tasks get no further releases
    take_switch(P * 1000 + 5000, tid);
    chk("no release after TERMINATE", tid, -1);
    bad = 0;
    for (int i = 1; i < N; i++) if (dut.u_kernel.st[i] != TS_DORMANT) bad++;
    chk("all tasks dormant", bad, 0);
    chk("idle task executing", exec_tid, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
