// fh_timeout_unit: one time-out timer per task.
//
// Serves RELATIVE_DELAY and the time-outs of WAIT_IRQ_EXTERNAL, CALL and
// ACCEPT. A task waits in at most one of these at a time, so one deadline
// per task is enough; the original drawing shows a separate time-out dial
// beside each of those queues, which this block merges.
//
// How it works: `arm` stores deadline = now + delay for a task and marks it
// active; `disarm` clears it. A scanner visits one task per clock cycle, so
// every active deadline is looked at once every NTASKS cycles (256 cycles,
// well below one tick), which keeps the cost independent of how many
// timers run. A deadline is reached when (now - deadline), read as a
// signed number, is not negative; delays must therefore stay below
// 2**(TW-1) ticks. A reached deadline is offered on exp_valid/exp_tid and
// the scanner waits until the kernel answers with exp_ack, which also
// clears the timer. A command for the task on offer withdraws the offer,
// so a stale expiry can never be delivered.
//
// Timing: an expiry is offered at most NTASKS cycles after its tick plus
// the time the kernel needs to take earlier offers. Commands take effect
// on the next clock edge.
module fh_timeout_unit #(
  parameter int unsigned NTASKS = 256,
  parameter int unsigned TW     = 16,
  localparam int unsigned TIDW  = $clog2(NTASKS)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [TW-1:0]   now,
  // command port
  input  logic            cmd_valid,
  input  logic            cmd_arm,     // 1: arm, 0: disarm
  input  logic [TIDW-1:0] cmd_tid,
  input  logic [TW-1:0]   cmd_delay,   // ticks, used when arming
  // expiry offer
  output logic            exp_valid,
  output logic [TIDW-1:0] exp_tid,
  input  logic            exp_ack
);
  logic [TW-1:0]   deadline [NTASKS];
  logic            active   [NTASKS];
  logic [TIDW-1:0] idx;
  logic [TW-1:0]   diff;
  logic            reached;
  logic            cmd_hits_offer;
  logic            cmd_hits_idx;

  assign diff           = now - deadline[idx];
  assign reached        = !diff[TW-1];
  assign cmd_hits_offer = cmd_valid && cmd_tid == exp_tid;
  assign cmd_hits_idx   = cmd_valid && cmd_tid == idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NTASKS; i++) begin
        active[i]   <= 1'b0;
        deadline[i] <= '0;
      end
      idx       <= '0;
      exp_valid <= 1'b0;
      exp_tid   <= '0;
    end else begin
      if (exp_valid) begin
        if (exp_ack || cmd_hits_offer) begin
          exp_valid <= 1'b0;
          idx       <= idx + 1'b1;
          if (!cmd_hits_offer) active[exp_tid] <= 1'b0;
        end
      end else if (active[idx] && reached && !cmd_hits_idx) begin
        exp_valid <= 1'b1;
        exp_tid   <= idx;
      end else begin
        idx <= idx + 1'b1;
      end
      if (cmd_valid) begin
        active[cmd_tid]   <= cmd_arm;
        deadline[cmd_tid] <= now + cmd_delay;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) exp_ack |-> exp_valid)
    else $error("fh_timeout_unit: acknowledge without an offer");
endmodule
