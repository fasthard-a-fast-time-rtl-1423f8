// fh_irq_unit: tasks waiting for the eight external interrupts.
//
// Each interrupt line has one waiting-task slot. WAIT_IRQ_EXTERNAL puts the
// calling task in the slot of its line (`wait_*` port); the kernel refuses
// the call when the slot is taken (`waiting` shows which slots are). The
// lines are synchronised with two flip-flops and a rising edge is the
// interrupt. An edge on a line with a waiting task raises that line's
// fire flag; fired lines are offered to the kernel one at a time, lowest
// line first, on evt_valid/evt_tid/evt_irq, and evt_ack frees the slot.
// `cancel` empties a slot and drops a pending fire flag; the kernel uses
// it when the wait times out. An edge on a line nobody waits for is
// dropped.
//
// The original description gives eight lines and says the woken task
// keeps its own priority; one waiter per line, edge triggering and
// dropping unclaimed interrupts are this design's choices.
module fh_irq_unit #(
  parameter int unsigned NTASKS = 256,
  parameter int unsigned NIRQ   = 8,
  localparam int unsigned TIDW  = $clog2(NTASKS),
  localparam int unsigned IRQW  = $clog2(NIRQ)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NIRQ-1:0] irq_ext,      // asynchronous interrupt lines
  // wait registration
  input  logic            wait_valid,
  input  logic [IRQW-1:0] wait_irq,
  input  logic [TIDW-1:0] wait_tid,
  input  logic            cancel_valid,
  input  logic [IRQW-1:0] cancel_irq,
  output logic [NIRQ-1:0] waiting,      // slot occupied
  // wake-up offer
  output logic            evt_valid,
  output logic [TIDW-1:0] evt_tid,
  output logic [IRQW-1:0] evt_irq,
  input  logic            evt_ack
);
  logic [NIRQ-1:0] sync1, sync2, prev;
  logic [NIRQ-1:0] fire;
  logic [TIDW-1:0] waiter [NIRQ];
  logic [NIRQ-1:0] edge_det;

  assign edge_det = sync2 & ~prev;

  always_comb begin
    evt_valid = |fire;
    evt_irq   = '0;
    for (int i = NIRQ - 1; i >= 0; i--)
      if (fire[i]) evt_irq = IRQW'(i);
    evt_tid = waiter[evt_irq];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync1   <= '0;
      sync2   <= '0;
      prev    <= '0;
      fire    <= '0;
      waiting <= '0;
      for (int i = 0; i < NIRQ; i++) waiter[i] <= '0;
    end else begin
      sync1 <= irq_ext;
      sync2 <= sync1;
      prev  <= sync2;
      fire  <= fire | (edge_det & waiting);
      if (evt_ack && evt_valid) begin
        fire[evt_irq]    <= 1'b0;
        waiting[evt_irq] <= 1'b0;
      end
      if (cancel_valid) begin
        fire[cancel_irq]    <= 1'b0;
        waiting[cancel_irq] <= 1'b0;
      end
      if (wait_valid) begin
        waiting[wait_irq] <= 1'b1;
        waiter[wait_irq]  <= wait_tid;
        fire[wait_irq]    <= 1'b0;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) evt_ack |-> evt_valid)
    else $error("fh_irq_unit: acknowledge without an offer");
  assert property (@(posedge clk) disable iff (!rst_n) wait_valid |-> !waiting[wait_irq])
    else $error("fh_irq_unit: slot already taken");
endmodule
