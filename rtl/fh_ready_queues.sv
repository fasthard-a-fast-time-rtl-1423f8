// fh_ready_queues: one first-in first-out queue of ready tasks per
// priority level.
//
// A task made ready is appended to the queue of its priority (`push`); the
// scheduler takes the head of a queue (`pop`). `nonempty` has one bit per
// priority, and `head_tid` shows the head of queue `head_prio`
// combinationally, so the scheduler can pick and pop in the same cycle.
// Because a task is in at most one queue at a time, a queue of NTASKS
// entries can never overflow; an assertion checks that. A push and a pop
// in the same cycle are allowed, also on the same queue.
//
// Eight ready queues follow the original description; their FIFO order
// among tasks of equal priority is this design's choice. Each queue is an
// array of task numbers with a read pointer, a write pointer and a count.
module fh_ready_queues #(
  parameter int unsigned NTASKS = 256,
  parameter int unsigned NPRIO  = 8,
  localparam int unsigned TIDW  = $clog2(NTASKS),
  localparam int unsigned PRIOW = $clog2(NPRIO)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [PRIOW-1:0] push_prio,
  input  logic [TIDW-1:0]  push_tid,
  input  logic             pop,
  input  logic [PRIOW-1:0] pop_prio,
  input  logic [PRIOW-1:0] head_prio,
  output logic [TIDW-1:0]  head_tid,
  output logic [NPRIO-1:0] nonempty
);
  logic [TIDW-1:0] mem   [NPRIO][NTASKS];
  logic [TIDW-1:0] rd_ptr[NPRIO];
  logic [TIDW-1:0] wr_ptr[NPRIO];
  logic [TIDW:0]   count [NPRIO];

  assign head_tid = mem[head_prio][rd_ptr[head_prio]];

  always_comb
    for (int p = 0; p < NPRIO; p++) nonempty[p] = count[p] != '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NPRIO; p++) begin
        rd_ptr[p] <= '0;
        wr_ptr[p] <= '0;
        count[p]  <= '0;
      end
    end else begin
      for (int p = 0; p < NPRIO; p++) begin
        if (push && push_prio == PRIOW'(p)) begin
          mem[p][wr_ptr[p]] <= push_tid;
          wr_ptr[p]         <= wr_ptr[p] + 1'b1;
        end
        if (pop && pop_prio == PRIOW'(p)) rd_ptr[p] <= rd_ptr[p] + 1'b1;
        count[p] <= count[p] + (TIDW+1)'(push && push_prio == PRIOW'(p))
                             - (TIDW+1)'(pop && pop_prio == PRIOW'(p));
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) pop |-> nonempty[pop_prio])
    else $error("fh_ready_queues: pop from an empty queue");
  assert property (@(posedge clk) disable iff (!rst_n)
                   push |-> (count[push_prio] != (TIDW+1)'(NTASKS)))
    else $error("fh_ready_queues: push to a full queue");
endmodule
