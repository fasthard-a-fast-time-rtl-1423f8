// fh_scheduler: chooses the next task and decides when to switch.
//
// The highest non-empty ready queue wins (priority 0 is the highest). A
// task switch is requested when switching is allowed and either the
// executing task has stopped executing (it blocked or terminated) and some
// task is ready, or a ready task has a strictly higher priority than the
// executing one (preemption). Tasks of equal priority do not preempt each
// other. Switching is allowed only while the CPU does not block it
// (BLOCK_TSW = 0) and no switch is already under way.
//
// Purely combinational. The original description names the scheduler and
// the eight queues feeding it; the priority order and the preemption rule
// are this design's choices.
module fh_scheduler #(
  parameter int unsigned NPRIO  = 8,
  localparam int unsigned PRIOW = $clog2(NPRIO)
) (
  input  logic [NPRIO-1:0] nonempty,     // ready queue status
  input  logic             run_active,   // executing task still executes
  input  logic [PRIOW-1:0] run_prio,     // its priority
  input  logic             allowed,      // BLOCK_TSW clear, no switch running
  output logic             any_ready,
  output logic [PRIOW-1:0] best_prio,
  output logic             do_switch
);
  always_comb begin
    best_prio = '0;
    for (int p = NPRIO - 1; p >= 0; p--)
      if (nonempty[p]) best_prio = PRIOW'(p);
    any_ready = |nonempty;
    do_switch = allowed && any_ready && (!run_active || best_prio < run_prio);
  end
endmodule
