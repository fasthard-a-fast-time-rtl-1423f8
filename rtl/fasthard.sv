// fasthard: a real-time kernel in hardware, working beside a standard CPU.
//
// FASTHARD keeps all kernel state (256 tasks, 8 priorities) and does all
// kernel work (ready queues, scheduling, delays, periodic starts,
// interrupt waits, rendezvous) while the CPU only runs task code. The CPU
// talks to it through seven 16-bit registers on its bus; FASTHARD asks the
// CPU to change task with a single interrupt line, IRQ_CPU, and wakes
// tasks on eight external interrupt lines.
//
// Blocks: fh_bus_if (registers), fh_kernel (service calls and task table),
// fh_ready_queues (8 FIFOs), fh_scheduler (choice of next task), fh_run
// (task-switch handshake), fh_timebase (tick), fh_timeout_unit (delays and
// time-outs), fh_period_unit (periodic start), fh_irq_unit (external
// interrupts).
//
// CPU bus: one access per cycle in which `cs` is high; `rw_n` = 1 reads
// (rdata is combinational), 0 writes on the clock edge. Register map and
// protocols are described in fh_bus_if, fh_run and fh_kernel. The block
// structure and the bus registers follow the original description; the
// bus timing and the merged time-out store are this design's choices.
module fasthard #(
  parameter int unsigned NTASKS      = fasthard_pkg::NTASKS,
  parameter int unsigned NPRIO       = fasthard_pkg::NPRIO,
  parameter int unsigned NIRQ        = fasthard_pkg::NIRQ,
  parameter int unsigned TICK_CYCLES = 1000,
  localparam int unsigned DW         = fasthard_pkg::DW,
  localparam int unsigned NPARAM     = fasthard_pkg::NPARAM,
  localparam int unsigned TW         = fasthard_pkg::TW,
  localparam int unsigned TIDW       = $clog2(NTASKS),
  localparam int unsigned PRIOW      = $clog2(NPRIO),
  localparam int unsigned IRQW       = $clog2(NIRQ)
) (
  input  logic            clk,
  input  logic            rst_n,
  // CPU system bus
  input  logic            cs,
  input  logic            rw_n,
  input  logic [2:0]      adr,
  input  logic [DW-1:0]   wdata,
  output logic [DW-1:0]   rdata,
  // interrupt to the CPU
  output logic            irq_cpu,
  // external interrupts
  input  logic [NIRQ-1:0] irq_external,
  // status
  output logic [TIDW-1:0] exec_tid,      // task the kernel sees executing
  output logic [TW-1:0]   now            // kernel time in ticks
);
  logic            hs_tsw, block_tsw, hs_svc;
  logic [DW-1:0]   call_svc, return_data;
  logic [DW-1:0]   params [NPARAM];
  logic [TIDW-1:0] next_task_id;

  logic             rq_push, rq_pop;
  logic [PRIOW-1:0] rq_push_prio;
  logic [TIDW-1:0]  rq_push_tid, rq_head_tid;
  logic [NPRIO-1:0] rq_nonempty;

  logic             sch_allowed, sch_run_active, sch_do_switch, sch_any_ready;
  logic [PRIOW-1:0] sch_run_prio, sch_best_prio;

  logic             run_start, run_busy, run_done, run_done_ack;
  logic [TIDW-1:0]  run_next;

  logic             tick;
  logic             tmo_cmd_valid, tmo_cmd_arm, tmo_exp_valid, tmo_exp_ack;
  logic [TIDW-1:0]  tmo_cmd_tid, tmo_exp_tid;
  logic [TW-1:0]    tmo_cmd_delay;
  logic             per_cmd_valid, per_cmd_on, per_rel_valid, per_rel_ack;
  logic [TIDW-1:0]  per_cmd_tid, per_rel_tid;
  logic [TW-1:0]    per_cmd_period;
  logic             irq_wait_valid, irq_cancel_valid, irq_evt_valid, irq_evt_ack;
  logic [IRQW-1:0]  irq_wait_irq, irq_cancel_irq, irq_evt_irq;
  logic [TIDW-1:0]  irq_wait_tid, irq_evt_tid;
  logic [NIRQ-1:0]  irq_waiting;

  fh_bus_if #(.NTASKS(NTASKS), .DW(DW), .NPARAM(NPARAM)) u_bus (
    .clk, .rst_n, .cs, .rw_n, .adr, .wdata, .rdata,
    .hs_tsw, .block_tsw, .call_svc, .params,
    .next_task_id, .hs_svc, .return_data);

  fh_kernel #(.NTASKS(NTASKS), .NPRIO(NPRIO), .NIRQ(NIRQ), .DW(DW),
              .NPARAM(NPARAM), .TW(TW)) u_kernel (
    .clk, .rst_n,
    .call_svc, .params, .block_tsw, .hs_svc, .return_data, .run_tid(exec_tid),
    .rq_push, .rq_push_prio, .rq_push_tid, .rq_pop, .rq_head_tid,
    .sch_allowed, .sch_run_active, .sch_run_prio, .sch_do_switch,
    .run_start, .run_next, .run_busy, .run_done, .run_done_ack,
    .tmo_cmd_valid, .tmo_cmd_arm, .tmo_cmd_tid, .tmo_cmd_delay,
    .tmo_exp_valid, .tmo_exp_tid, .tmo_exp_ack,
    .per_cmd_valid, .per_cmd_on, .per_cmd_tid, .per_cmd_period,
    .per_rel_valid, .per_rel_tid, .per_rel_ack,
    .irq_wait_valid, .irq_wait_irq, .irq_wait_tid,
    .irq_cancel_valid, .irq_cancel_irq, .irq_waiting,
    .irq_evt_valid, .irq_evt_tid, .irq_evt_ack);

  fh_ready_queues #(.NTASKS(NTASKS), .NPRIO(NPRIO)) u_rq (
    .clk, .rst_n,
    .push(rq_push), .push_prio(rq_push_prio), .push_tid(rq_push_tid),
    .pop(rq_pop), .pop_prio(sch_best_prio),
    .head_prio(sch_best_prio), .head_tid(rq_head_tid),
    .nonempty(rq_nonempty));

  fh_scheduler #(.NPRIO(NPRIO)) u_sched (
    .nonempty(rq_nonempty), .run_active(sch_run_active),
    .run_prio(sch_run_prio), .allowed(sch_allowed),
    .any_ready(sch_any_ready), .best_prio(sch_best_prio),
    .do_switch(sch_do_switch));

  fh_run #(.NTASKS(NTASKS)) u_run (
    .clk, .rst_n, .start(run_start), .next_tid(run_next), .hs_tsw,
    .irq_cpu, .next_task_id, .busy(run_busy), .done(run_done),
    .done_ack(run_done_ack));

  fh_timebase #(.TICK_CYCLES(TICK_CYCLES), .TW(TW)) u_time (
    .clk, .rst_n, .tick, .now);

  fh_timeout_unit #(.NTASKS(NTASKS), .TW(TW)) u_tmo (
    .clk, .rst_n, .now,
    .cmd_valid(tmo_cmd_valid), .cmd_arm(tmo_cmd_arm), .cmd_tid(tmo_cmd_tid),
    .cmd_delay(tmo_cmd_delay),
    .exp_valid(tmo_exp_valid), .exp_tid(tmo_exp_tid), .exp_ack(tmo_exp_ack));

  fh_period_unit #(.NTASKS(NTASKS), .TW(TW)) u_per (
    .clk, .rst_n, .now,
    .cmd_valid(per_cmd_valid), .cmd_on(per_cmd_on), .cmd_tid(per_cmd_tid),
    .cmd_period(per_cmd_period),
    .rel_valid(per_rel_valid), .rel_tid(per_rel_tid), .rel_ack(per_rel_ack));

  fh_irq_unit #(.NTASKS(NTASKS), .NIRQ(NIRQ)) u_irq (
    .clk, .rst_n, .irq_ext(irq_external),
    .wait_valid(irq_wait_valid), .wait_irq(irq_wait_irq), .wait_tid(irq_wait_tid),
    .cancel_valid(irq_cancel_valid), .cancel_irq(irq_cancel_irq),
    .waiting(irq_waiting),
    .evt_valid(irq_evt_valid), .evt_tid(irq_evt_tid), .evt_irq(irq_evt_irq),
    .evt_ack(irq_evt_ack));
endmodule
