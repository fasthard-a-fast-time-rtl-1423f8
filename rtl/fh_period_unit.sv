// fh_period_unit: periodic start of tasks.
//
// INIT_PERIOD_TIME gives a task a period; from then on the task is
// released every `period` ticks, counted from the tick at which the period
// was set. The next release time advances by exactly one period at each
// release (release = previous release + period), so the releases do not
// drift however late the kernel handles them. OFF_PERIOD_START (or
// TERMINATE) switches the periodic start off.
//
// How it works: like fh_timeout_unit, a scanner visits one task per cycle
// and compares its next release time with `now` (wrap-safe, so periods
// must stay below 2**(TW-1) ticks). A due release is offered on
// rel_valid/rel_tid; on rel_ack the next release time is advanced. The
// kernel decides what a release means: if the task is waiting for its
// next period it becomes ready, otherwise the release counts as a missed
// deadline. A task that has fallen several periods behind gets one offer
// per missed period. Periodic start follows the original description; the
// scanning, the drift-free release and the period-0 rule (a period of zero
// switches periodic start off) are this design's choices.
module fh_period_unit #(
  parameter int unsigned NTASKS = 256,
  parameter int unsigned TW     = 16,
  localparam int unsigned TIDW  = $clog2(NTASKS)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [TW-1:0]   now,
  // command port
  input  logic            cmd_valid,
  input  logic            cmd_on,      // 1: INIT_PERIOD_TIME, 0: off
  input  logic [TIDW-1:0] cmd_tid,
  input  logic [TW-1:0]   cmd_period,
  // release offer
  output logic            rel_valid,
  output logic [TIDW-1:0] rel_tid,
  input  logic            rel_ack
);
  logic [TW-1:0]   period   [NTASKS];
  logic [TW-1:0]   next_rel [NTASKS];
  logic            on       [NTASKS];
  logic [TIDW-1:0] idx;
  logic [TW-1:0]   diff;
  logic            due;
  logic            cmd_hits_offer;
  logic            cmd_hits_idx;

  assign diff           = now - next_rel[idx];
  assign due            = on[idx] && !diff[TW-1];
  assign cmd_hits_offer = cmd_valid && cmd_tid == rel_tid;
  assign cmd_hits_idx   = cmd_valid && cmd_tid == idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NTASKS; i++) begin
        period[i]   <= '0;
        next_rel[i] <= '0;
        on[i]       <= 1'b0;
      end
      idx       <= '0;
      rel_valid <= 1'b0;
      rel_tid   <= '0;
    end else begin
      if (rel_valid) begin
        if (rel_ack || cmd_hits_offer) begin
          rel_valid <= 1'b0;
          idx       <= idx + 1'b1;
          if (!cmd_hits_offer) next_rel[rel_tid] <= next_rel[rel_tid] + period[rel_tid];
        end
      end else if (due && !cmd_hits_idx) begin
        rel_valid <= 1'b1;
        rel_tid   <= idx;
      end else begin
        idx <= idx + 1'b1;
      end
      if (cmd_valid) begin
        on[cmd_tid]       <= cmd_on && cmd_period != '0;
        period[cmd_tid]   <= cmd_period;
        next_rel[cmd_tid] <= now + cmd_period;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) rel_ack |-> rel_valid)
    else $error("fh_period_unit: acknowledge without an offer");
endmodule
