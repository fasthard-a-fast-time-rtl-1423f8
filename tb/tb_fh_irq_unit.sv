// tb_fh_irq_unit: registers waiting tasks on interrupt lines, pulses the
// lines and checks which task is offered, that lines without a waiter are
// ignored, that cancel drops a wait and that simultaneous interrupts are
// offered lowest line first.
`timescale 1ns/1ps
module tb_fh_irq_unit;
  logic clk = 0, rst_n = 0;
  logic [7:0] irq_ext, waiting;
  logic wait_valid, cancel_valid, evt_valid, evt_ack;
  logic [2:0] wait_irq, cancel_irq, evt_irq;
  logic [7:0] wait_tid, evt_tid;
  int checks = 0, failures = 0;

  fh_irq_unit #(.NTASKS(256), .NIRQ(8)) dut (.clk, .rst_n, .irq_ext, .wait_valid,
    .wait_irq, .wait_tid, .cancel_valid, .cancel_irq, .waiting, .evt_valid, .evt_tid,
    .evt_irq, .evt_ack);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic register(input int i, input int t);
    @(negedge clk); wait_valid = 1; wait_irq = 3'(i); wait_tid = 8'(t);
    @(negedge clk); wait_valid = 0;
  endtask

  task automatic pulse(input logic [7:0] m);
    @(negedge clk); irq_ext = m;
    repeat (3) @(negedge clk);
    irq_ext = 0;
    repeat (2) @(negedge clk);
  endtask

  task automatic take(input int exp_irq, input int exp_tid);
    chk("evt_valid", evt_valid, 1);
    chk("evt_irq", evt_irq, exp_irq);
    chk("evt_tid", evt_tid, exp_tid);
    @(negedge clk); evt_ack = 1;
    @(negedge clk); evt_ack = 0;
  endtask

  initial begin
    irq_ext = 0; wait_valid = 0; cancel_valid = 0; evt_ack = 0;
    wait_irq = 0; wait_tid = 0; cancel_irq = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    register(2, 77);
    chk("waiting", waiting, 8'b0000_0100);
    pulse(8'b0000_1000);            // line 3: nobody waits
    chk("ignored", evt_valid, 0);
    pulse(8'b0000_0100);
    take(2, 77);
    chk("slot freed", waiting, 0);
    register(6, 12); register(1, 200); register(4, 5);
    pulse(8'b0101_0010);            // lines 6, 4 and 1 together
    take(1, 200);
    take(4, 5);
    take(6, 12);
    chk("no more", evt_valid, 0);
    register(0, 9);
    @(negedge clk); cancel_valid = 1; cancel_irq = 0;
    @(negedge clk); cancel_valid = 0;
    pulse(8'b0000_0001);
    chk("cancelled", evt_valid, 0);
    // a level that stays high fires once
    register(5, 33);
    @(negedge clk); irq_ext = 8'b0010_0000;
    repeat (5) @(negedge clk);
    take(5, 33);
    register(5, 34);
    repeat (5) @(negedge clk);
    chk("held level no edge", evt_valid, 0);
    irq_ext = 0;
    repeat (3) @(negedge clk);
    pulse(8'b0010_0000);
    take(5, 34);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
