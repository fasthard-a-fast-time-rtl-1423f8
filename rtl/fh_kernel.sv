// fh_kernel: the service-call engine and task table of FASTHARD.
//
// The kernel keeps, for every task, its state (Figure 1 of the original
// state diagram: dormant, ready, executing, delayed, waiting for its next
// period, waiting for an interrupt, calling, accepting, in rendezvous),
// its priority, the argument it waits on (rendezvous entry or interrupt
// line), the task it calls, the caller it serves, its 16-bit return word
// and its count of missed periods. It executes the service calls written
// to CALL_SVC and the wake-ups offered by the time-out, period and
// interrupt blocks, feeds the ready queues and starts task switches.
//
// How it works: a single controller takes one job per clock cycle, in this
// order of precedence: completing a task switch, a service call, an
// interrupt wake-up, a time-out, a period release, starting a task switch.
// Every job takes one cycle, except ACCEPT, which searches the whole table
// for the longest-waiting caller of its entry, one task per cycle (always
// NTASKS + 1 cycles, found or not). Each queued CALL is stamped with a
// running call number, so the call queues are first come, first served. A job writes
// at most two table entries, pushes at most one task into a ready queue
// and sends at most one command to each timer block, all in the same
// cycle; the outputs to the other blocks are combinational so that the
// decision and its effect happen together. Execution times are therefore
// fixed and independent of the number of active tasks; ACCEPT's is the
// table length.
//
// Service calls (bit of CALL_SVC; parameter words in argument order):
//   0 RELATIVE_DELAY(time)                 -> delayed for `time` ticks
//   1 TERMINATE()                          -> dormant, periodic start off
//   2 ACTIVATE(task_id, priority, start)   -> that task becomes ready
//   3 INIT_PERIOD_TIME(period)             -> releases every `period`
//   4 WAIT_FOR_NEXT_PERIOD()               -> waits; returns missed count
//   5 OFF_PERIOD_START()                   -> returns 1 if already off
//   6 WAIT_IRQ_EXTERNAL(irq_nr, time_out)  -> waits for the interrupt
//   7 ACCEPT(entry, msg_pointer, time_out) -> returns caller task id
//   8 COMPLETE()                           -> caller of the rendezvous ready
//   9 CALL(entry, msg_pointer, task_id, time_out)
// A time-out of 0 waits forever. The return word (RETURN_DATA) is the
// executing task's: bit 15 = time-out, bit 14 = call refused, low bits =
// caller id or missed-period count. A blocking call sets HS_SVC at once;
// the task reads RETURN_DATA again after it has been resumed. The start
// address and the message pointer belong in the task control block kept
// in main memory by software; the kernel does not store them.
//
// The set of service calls, their bit positions and arguments, the eight
// priorities and 256 tasks follow the original description. The return
// encoding, the error rules, keeping the call queues as stamped table
// entries searched by ACCEPT, the reset state (task 0
// executing at the lowest priority, to serve as the idle task), task 0
// yielding to every ready task and
// priority 0 being the highest are this design's choices.
module fh_kernel #(
  parameter int unsigned NTASKS = 256,
  parameter int unsigned NPRIO  = 8,
  parameter int unsigned NIRQ   = 8,
  parameter int unsigned DW     = 16,
  parameter int unsigned NPARAM = 4,
  parameter int unsigned TW     = 16,
  localparam int unsigned TIDW  = $clog2(NTASKS),
  localparam int unsigned PRIOW = $clog2(NPRIO),
  localparam int unsigned IRQW  = $clog2(NIRQ)
) (
  input  logic             clk,
  input  logic             rst_n,
  // registers of the bus interface
  input  logic [DW-1:0]    call_svc,
  input  logic [DW-1:0]    params [NPARAM],
  input  logic             block_tsw,
  output logic             hs_svc,
  output logic [DW-1:0]    return_data,
  output logic [TIDW-1:0]  run_tid,          // task the kernel sees executing
  // ready queues
  output logic             rq_push,
  output logic [PRIOW-1:0] rq_push_prio,
  output logic [TIDW-1:0]  rq_push_tid,
  output logic             rq_pop,
  input  logic [TIDW-1:0]  rq_head_tid,      // head of queue sch_best_prio
  // scheduler
  output logic             sch_allowed,
  output logic             sch_run_active,
  output logic [PRIOW-1:0] sch_run_prio,
  input  logic             sch_do_switch,
  // run (task switch)
  output logic             run_start,
  output logic [TIDW-1:0]  run_next,
  input  logic             run_busy,
  input  logic             run_done,
  output logic             run_done_ack,
  // time-out unit
  output logic             tmo_cmd_valid,
  output logic             tmo_cmd_arm,
  output logic [TIDW-1:0]  tmo_cmd_tid,
  output logic [TW-1:0]    tmo_cmd_delay,
  input  logic             tmo_exp_valid,
  input  logic [TIDW-1:0]  tmo_exp_tid,
  output logic             tmo_exp_ack,
  // period unit
  output logic             per_cmd_valid,
  output logic             per_cmd_on,
  output logic [TIDW-1:0]  per_cmd_tid,
  output logic [TW-1:0]    per_cmd_period,
  input  logic             per_rel_valid,
  input  logic [TIDW-1:0]  per_rel_tid,
  output logic             per_rel_ack,
  // interrupt unit
  output logic             irq_wait_valid,
  output logic [IRQW-1:0]  irq_wait_irq,
  output logic [TIDW-1:0]  irq_wait_tid,
  output logic             irq_cancel_valid,
  output logic [IRQW-1:0]  irq_cancel_irq,
  input  logic [NIRQ-1:0]  irq_waiting,
  input  logic             irq_evt_valid,
  input  logic [TIDW-1:0]  irq_evt_tid,
  output logic             irq_evt_ack
);
  import fasthard_pkg::*;

  localparam int unsigned AW = 8;       // width of a wait argument
  localparam int unsigned MW = DW - 1;  // missed-period counter width

  // ---- task table ----------------------------------------------------------
  task_state_e     st      [NTASKS];
  logic [PRIOW-1:0] pr     [NTASKS];
  logic [AW-1:0]   warg    [NTASKS];
  logic [TIDW-1:0] tgt     [NTASKS];
  logic [TIDW-1:0] partner [NTASKS];
  logic [DW-1:0]   ret     [NTASKS];
  logic [MW-1:0]   missed  [NTASKS];
  logic            per_on  [NTASKS];
  logic [DW-1:0]   stamp   [NTASKS];   // call order, for the call queues

  // one write port into the table
  typedef struct packed {
    logic            en;
    logic [TIDW-1:0] tid;
    logic            we_st;      task_state_e     st;
    logic            we_pr;      logic [PRIOW-1:0] pr;
    logic            we_warg;    logic [AW-1:0]   warg;
    logic            we_tgt;     logic [TIDW-1:0] tgt;
    logic            we_partner; logic [TIDW-1:0] partner;
    logic            we_ret;     logic [DW-1:0]   ret;
    logic            we_missed;  logic [MW-1:0]   missed;
    logic            we_per;     logic            per_on;
    logic            we_stamp;   logic [DW-1:0]   stamp;
  } twrite_t;

  typedef enum logic [0:0] {K_IDLE, K_SCAN} kstate_e;

  kstate_e         kstate, kstate_n;
  logic [TIDW-1:0] scan_idx, scan_idx_n;
  logic            scan_found, scan_found_n;    // a caller seen so far
  logic [TIDW-1:0] scan_best, scan_best_n;      // oldest caller seen so far
  logic [DW-1:0]   scan_age, scan_age_n;        // its age in calls
  logic [DW-1:0]   call_seq, call_seq_n;        // calls queued so far
  logic            cand, better;
  logic [DW-1:0]   age;
  logic [TIDW-1:0] sel;
  logic            sel_found;
  logic [TIDW-1:0] sw_next, sw_next_n;
  logic [TIDW-1:0] run_tid_n;
  logic            hs_svc_set;
  twrite_t         wa, wb;

  logic            svc_pending;
  logic [TIDW-1:0] self;
  logic [DW-1:0]   p0, p1, p2, p3;

  assign self         = run_tid;
  assign p0           = params[0];
  assign p1           = params[1];
  assign p2           = params[2];
  assign p3           = params[3];
  assign svc_pending  = call_svc != '0 && !hs_svc;
  assign return_data  = ret[run_tid];
  // task 0 is the idle task: any ready task preempts it, even at priority 7
  assign sch_run_active = st[run_tid] == TS_EXECUTING && run_tid != '0;
  assign sch_run_prio   = pr[run_tid];
  assign sch_allowed    = kstate == K_IDLE && !block_tsw && !run_busy;

  // ---- ACCEPT search: oldest waiting caller of this entry -----------------
  always_comb begin
    cand      = st[scan_idx] == TS_CALL_WAIT && tgt[scan_idx] == self &&
                warg[scan_idx] == p0[AW-1:0];
    age       = call_seq - stamp[scan_idx];
    better    = cand && (!scan_found || age > scan_age);
    sel_found = scan_found || cand;
    sel       = better ? scan_idx : scan_best;
  end

  // ---- decision ------------------------------------------------------------
  always_comb begin
    kstate_n         = kstate;
    scan_idx_n       = scan_idx;
    scan_found_n     = scan_found;
    scan_best_n      = scan_best;
    scan_age_n       = scan_age;
    call_seq_n       = call_seq;
    sw_next_n        = sw_next;
    run_tid_n        = run_tid;
    hs_svc_set       = 1'b0;
    wa               = '0;
    wb               = '0;
    rq_push          = 1'b0;
    rq_push_prio     = '0;
    rq_push_tid      = '0;
    rq_pop           = 1'b0;
    run_start        = 1'b0;
    run_next         = rq_head_tid;
    run_done_ack     = 1'b0;
    tmo_cmd_valid    = 1'b0;
    tmo_cmd_arm      = 1'b0;
    tmo_cmd_tid      = '0;
    tmo_cmd_delay    = '0;
    tmo_exp_ack      = 1'b0;
    per_cmd_valid    = 1'b0;
    per_cmd_on       = 1'b0;
    per_cmd_tid      = self;
    per_cmd_period   = '0;
    per_rel_ack      = 1'b0;
    irq_wait_valid   = 1'b0;
    irq_wait_irq     = p0[IRQW-1:0];
    irq_wait_tid     = self;
    irq_cancel_valid = 1'b0;
    irq_cancel_irq   = '0;
    irq_evt_ack      = 1'b0;

    unique case (kstate)
      K_IDLE: begin
        if (run_done) begin
          // ---- task switch completed by the CPU
          run_done_ack = 1'b1;
          if (st[run_tid] == TS_EXECUTING) begin
            wa.en = 1'b1; wa.tid = run_tid; wa.we_st = 1'b1; wa.st = TS_READY;
            rq_push = 1'b1; rq_push_prio = pr[run_tid]; rq_push_tid = run_tid;
          end
          wb.en = 1'b1; wb.tid = sw_next; wb.we_st = 1'b1; wb.st = TS_EXECUTING;
          run_tid_n = sw_next;
        end else if (svc_pending) begin
          // ---- service call of the executing task
          hs_svc_set = 1'b1;
          wb.en = 1'b1; wb.tid = self; wb.we_ret = 1'b1; wb.ret = RET_OK;
          if (call_svc[B_RELATIVE_DELAY]) begin
            wb.we_st = 1'b1; wb.st = TS_DELAY;
            tmo_cmd_valid = 1'b1; tmo_cmd_arm = 1'b1; tmo_cmd_tid = self;
            tmo_cmd_delay = p0[TW-1:0];
          end else if (call_svc[B_TERMINATE]) begin
            wb.we_st = 1'b1; wb.st = TS_DORMANT;
            wb.we_per = 1'b1; wb.per_on = 1'b0;
            per_cmd_valid = 1'b1; per_cmd_on = 1'b0;
          end else if (call_svc[B_ACTIVATE]) begin
            if (p0 < DW'(NTASKS) && p1 < DW'(NPRIO) && p0[TIDW-1:0] != self &&
                st[p0[TIDW-1:0]] == TS_DORMANT) begin
              wa.en = 1'b1; wa.tid = p0[TIDW-1:0];
              wa.we_st = 1'b1; wa.st = TS_READY;
              wa.we_pr = 1'b1; wa.pr = p1[PRIOW-1:0];
              wa.we_ret = 1'b1; wa.ret = RET_OK;
              wa.we_missed = 1'b1; wa.missed = '0;
              rq_push = 1'b1; rq_push_prio = p1[PRIOW-1:0]; rq_push_tid = p0[TIDW-1:0];
            end else begin
              wb.ret = RET_ERROR;
            end
          end else if (call_svc[B_INIT_PERIOD_TIME]) begin
            wb.we_per = 1'b1; wb.per_on = p0 != '0;
            wb.we_missed = 1'b1; wb.missed = '0;
            per_cmd_valid = 1'b1; per_cmd_on = 1'b1; per_cmd_period = p0[TW-1:0];
          end else if (call_svc[B_WAIT_NEXT_PERIOD]) begin
            if (per_on[self]) begin
              wb.we_st = 1'b1; wb.st = TS_PERIOD_WAIT;
            end else begin
              wb.ret = RET_ERROR;
            end
          end else if (call_svc[B_OFF_PERIOD_START]) begin
            wb.ret = per_on[self] ? RET_OK : DW'(1);
            wb.we_per = 1'b1; wb.per_on = 1'b0;
            per_cmd_valid = 1'b1; per_cmd_on = 1'b0;
          end else if (call_svc[B_WAIT_IRQ_EXTERNAL]) begin
            if (p0 < DW'(NIRQ) && !irq_waiting[p0[IRQW-1:0]]) begin
              wb.we_st = 1'b1; wb.st = TS_IRQ_WAIT;
              wb.we_warg = 1'b1; wb.warg = p0[AW-1:0];
              irq_wait_valid = 1'b1;
              if (p1 != '0) begin
                tmo_cmd_valid = 1'b1; tmo_cmd_arm = 1'b1; tmo_cmd_tid = self;
                tmo_cmd_delay = p1[TW-1:0];
              end
            end else begin
              wb.ret = RET_ERROR;
            end
          end else if (call_svc[B_ACCEPT]) begin
            hs_svc_set = 1'b0;   // finished by the search
            wb = '0;
            scan_idx_n   = '0;
            scan_found_n = 1'b0;
            scan_best_n  = '0;
            scan_age_n   = '0;
            kstate_n     = K_SCAN;
          end else if (call_svc[B_COMPLETE]) begin
            if (st[partner[self]] == TS_RENDEZVOUS && tgt[partner[self]] == self) begin
              wa.en = 1'b1; wa.tid = partner[self];
              wa.we_st = 1'b1; wa.st = TS_READY;
              wa.we_ret = 1'b1; wa.ret = RET_OK;
              rq_push = 1'b1; rq_push_prio = pr[partner[self]]; rq_push_tid = partner[self];
            end else begin
              wb.ret = RET_ERROR;
            end
          end else if (call_svc[B_CALL]) begin
            if (p2 >= DW'(NTASKS) || p2[TIDW-1:0] == self) begin
              wb.ret = RET_ERROR;
            end else if (st[p2[TIDW-1:0]] == TS_ACCEPT_WAIT &&
                         warg[p2[TIDW-1:0]] == p0[AW-1:0]) begin
              // callee already waits in ACCEPT: rendezvous starts now
              wa.en = 1'b1; wa.tid = p2[TIDW-1:0];
              wa.we_st = 1'b1; wa.st = TS_READY;
              wa.we_ret = 1'b1; wa.ret = DW'(self);
              wa.we_partner = 1'b1; wa.partner = self;
              rq_push = 1'b1; rq_push_prio = pr[p2[TIDW-1:0]]; rq_push_tid = p2[TIDW-1:0];
              tmo_cmd_valid = 1'b1; tmo_cmd_arm = 1'b0; tmo_cmd_tid = p2[TIDW-1:0];
              wb.we_st = 1'b1; wb.st = TS_RENDEZVOUS;
              wb.we_tgt = 1'b1; wb.tgt = p2[TIDW-1:0];
            end else begin
              // join the call queue of the callee
              wb.we_st = 1'b1; wb.st = TS_CALL_WAIT;
              wb.we_tgt = 1'b1; wb.tgt = p2[TIDW-1:0];
              wb.we_warg = 1'b1; wb.warg = p0[AW-1:0];
              wb.we_stamp = 1'b1; wb.stamp = call_seq;
              call_seq_n = call_seq + 1'b1;
              if (p3 != '0) begin
                tmo_cmd_valid = 1'b1; tmo_cmd_arm = 1'b1; tmo_cmd_tid = self;
                tmo_cmd_delay = p3[TW-1:0];
              end
            end
          end else begin
            wb.ret = RET_ERROR;   // no known service call bit
          end
        end else if (irq_evt_valid) begin
          // ---- external interrupt for a waiting task
          irq_evt_ack = 1'b1;
          if (st[irq_evt_tid] == TS_IRQ_WAIT) begin
            wa.en = 1'b1; wa.tid = irq_evt_tid;
            wa.we_st = 1'b1; wa.st = TS_READY;
            wa.we_ret = 1'b1; wa.ret = RET_OK;
            rq_push = 1'b1; rq_push_prio = pr[irq_evt_tid]; rq_push_tid = irq_evt_tid;
            tmo_cmd_valid = 1'b1; tmo_cmd_arm = 1'b0; tmo_cmd_tid = irq_evt_tid;
          end
        end else if (tmo_exp_valid) begin
          // ---- end of a delay or a time-out
          tmo_exp_ack = 1'b1;
          if (st[tmo_exp_tid] inside {TS_DELAY, TS_IRQ_WAIT, TS_CALL_WAIT, TS_ACCEPT_WAIT}) begin
            wa.en = 1'b1; wa.tid = tmo_exp_tid;
            wa.we_st = 1'b1; wa.st = TS_READY;
            wa.we_ret = 1'b1; wa.ret = st[tmo_exp_tid] == TS_DELAY ? RET_OK : RET_TIMEOUT;
            rq_push = 1'b1; rq_push_prio = pr[tmo_exp_tid]; rq_push_tid = tmo_exp_tid;
            if (st[tmo_exp_tid] == TS_IRQ_WAIT) begin
              irq_cancel_valid = 1'b1; irq_cancel_irq = warg[tmo_exp_tid][IRQW-1:0];
            end
          end
        end else if (per_rel_valid) begin
          // ---- periodic release
          per_rel_ack = 1'b1;
          wa.en = 1'b1; wa.tid = per_rel_tid; wa.we_missed = 1'b1;
          if (st[per_rel_tid] == TS_PERIOD_WAIT) begin
            wa.we_st = 1'b1; wa.st = TS_READY;
            wa.we_ret = 1'b1; wa.ret = DW'(missed[per_rel_tid]);
            wa.missed = '0;
            rq_push = 1'b1; rq_push_prio = pr[per_rel_tid]; rq_push_tid = per_rel_tid;
          end else begin
            wa.missed = (missed[per_rel_tid] == '1) ? missed[per_rel_tid]
                                                     : missed[per_rel_tid] + 1'b1;
          end
        end else if (sch_do_switch) begin
          // ---- start a task switch to the best ready task
          rq_pop    = 1'b1;
          run_start = 1'b1;
          sw_next_n = rq_head_tid;
        end
      end

      K_SCAN: begin
        // ---- ACCEPT: search the whole table for the oldest caller
        if (scan_idx != TIDW'(NTASKS - 1)) begin
          scan_idx_n   = scan_idx + 1'b1;
          scan_found_n = sel_found;
          scan_best_n  = sel;
          if (better) scan_age_n = age;
        end else if (sel_found) begin
          wa.en = 1'b1; wa.tid = sel;
          wa.we_st = 1'b1; wa.st = TS_RENDEZVOUS;
          tmo_cmd_valid = 1'b1; tmo_cmd_arm = 1'b0; tmo_cmd_tid = sel;
          wb.en = 1'b1; wb.tid = self;
          wb.we_partner = 1'b1; wb.partner = sel;
          wb.we_ret = 1'b1; wb.ret = DW'(sel);
          hs_svc_set = 1'b1;
          kstate_n   = K_IDLE;
        end else begin
          wb.en = 1'b1; wb.tid = self;
          wb.we_st = 1'b1; wb.st = TS_ACCEPT_WAIT;
          wb.we_warg = 1'b1; wb.warg = p0[AW-1:0];
          wb.we_ret = 1'b1; wb.ret = RET_OK;
          if (p2 != '0) begin
            tmo_cmd_valid = 1'b1; tmo_cmd_arm = 1'b1; tmo_cmd_tid = self;
            tmo_cmd_delay = p2[TW-1:0];
          end
          hs_svc_set = 1'b1;
          kstate_n   = K_IDLE;
        end
      end

      default: kstate_n = K_IDLE;
    endcase
  end

  // ---- state -----------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      kstate   <= K_IDLE;
      scan_idx <= '0;
      scan_found <= 1'b0;
      scan_best  <= '0;
      scan_age   <= '0;
      call_seq   <= '0;
      sw_next  <= '0;
      run_tid  <= '0;
      hs_svc   <= 1'b0;
      for (int i = 0; i < NTASKS; i++) begin
        st[i]      <= (i == 0) ? TS_EXECUTING : TS_DORMANT;
        pr[i]      <= (i == 0) ? PRIOW'(NPRIO - 1) : '0;
        warg[i]    <= '0;
        tgt[i]     <= '0;
        partner[i] <= '0;
        ret[i]     <= '0;
        missed[i]  <= '0;
        per_on[i]  <= 1'b0;
        stamp[i]   <= '0;
      end
    end else begin
      kstate   <= kstate_n;
      scan_idx <= scan_idx_n;
      scan_found <= scan_found_n;
      scan_best  <= scan_best_n;
      scan_age   <= scan_age_n;
      call_seq   <= call_seq_n;
      sw_next  <= sw_next_n;
      run_tid  <= run_tid_n;
      if (hs_svc_set)          hs_svc <= 1'b1;
      else if (call_svc == '0) hs_svc <= 1'b0;
      // write port A, then B (B wins on the same entry; jobs never need it)
      if (wa.en) begin
        if (wa.we_st)      st[wa.tid]      <= wa.st;
        if (wa.we_pr)      pr[wa.tid]      <= wa.pr;
        if (wa.we_warg)    warg[wa.tid]    <= wa.warg;
        if (wa.we_tgt)     tgt[wa.tid]     <= wa.tgt;
        if (wa.we_partner) partner[wa.tid] <= wa.partner;
        if (wa.we_ret)     ret[wa.tid]     <= wa.ret;
        if (wa.we_missed)  missed[wa.tid]  <= wa.missed;
        if (wa.we_per)     per_on[wa.tid]  <= wa.per_on;
        if (wa.we_stamp)   stamp[wa.tid]   <= wa.stamp;
      end
      if (wb.en) begin
        if (wb.we_st)      st[wb.tid]      <= wb.st;
        if (wb.we_pr)      pr[wb.tid]      <= wb.pr;
        if (wb.we_warg)    warg[wb.tid]    <= wb.warg;
        if (wb.we_tgt)     tgt[wb.tid]     <= wb.tgt;
        if (wb.we_partner) partner[wb.tid] <= wb.partner;
        if (wb.we_ret)     ret[wb.tid]     <= wb.ret;
        if (wb.we_missed)  missed[wb.tid]  <= wb.missed;
        if (wb.we_per)     per_on[wb.tid]  <= wb.per_on;
        if (wb.we_stamp)   stamp[wb.tid]   <= wb.stamp;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   (wa.en && wb.en) |-> (wa.tid != wb.tid))
    else $error("fh_kernel: two table writes to one task");
endmodule
