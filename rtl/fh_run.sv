// fh_run: the task-switch handshake with the CPU.
//
// `start` (with the chosen task in `next_tid`) loads the NEXT_TASK_ID
// register and raises IRQ_CPU. The CPU's interrupt routine sets HS_TSW to
// acknowledge, which lowers IRQ_CPU; it saves the old task's registers in
// that task's control block in memory, reads NEXT_TASK_ID, loads the new
// task's registers and clears HS_TSW. The falling HS_TSW completes the
// switch: `done` is raised and held until the kernel takes it with
// `done_ack`, so the kernel can be busy for a while without losing it.
// `busy` is high from `start` until `done_ack`. NEXT_TASK_ID keeps its
// value afterwards and so names the executing task.
//
// The IRQ_CPU / HS_TSW / NEXT_TASK_ID sequence follows the original
// description; the held `done` and the reset value (task 0) are this
// design's choices.
module fh_run #(
  parameter int unsigned NTASKS = 256,
  localparam int unsigned TIDW  = $clog2(NTASKS)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [TIDW-1:0] next_tid,
  input  logic            hs_tsw,        // HS_TSW bit 0 from the CPU
  output logic            irq_cpu,
  output logic [TIDW-1:0] next_task_id,  // NEXT_TASK_ID register
  output logic            busy,
  output logic            done,
  input  logic            done_ack
);
  typedef enum logic [1:0] {R_IDLE, R_IRQ, R_SAVE, R_DONE} run_state_e;
  run_state_e state;

  assign irq_cpu = state == R_IRQ;
  assign busy    = state != R_IDLE;
  assign done    = state == R_DONE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= R_IDLE;
      next_task_id <= '0;
    end else begin
      unique case (state)
        R_IDLE: if (start) begin
          next_task_id <= next_tid;
          state        <= R_IRQ;
        end
        R_IRQ:  if (hs_tsw)   state <= R_SAVE;
        R_SAVE: if (!hs_tsw)  state <= R_DONE;
        R_DONE: if (done_ack) state <= R_IDLE;
        default: state <= R_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("fh_run: start while a switch is under way");
endmodule
