// tb_fh_run: walks the task-switch handshake (start, IRQ_CPU, HS_TSW set,
// HS_TSW cleared, done, done_ack) several times and checks each signal at
// each step, including a kernel that takes a while to acknowledge.
`timescale 1ns/1ps
module tb_fh_run;
  logic clk = 0, rst_n = 0;
  logic start, hs_tsw, irq_cpu, busy, done, done_ack;
  logic [7:0] next_tid, next_task_id;
  int checks = 0, failures = 0;

  fh_run #(.NTASKS(256)) dut (.clk, .rst_n, .start, .next_tid, .hs_tsw, .irq_cpu,
    .next_task_id, .busy, .done, .done_ack);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_sig(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    start = 0; hs_tsw = 0; done_ack = 0; next_tid = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 6; n++) begin
      int wait_ack = n % 3;
      @(negedge clk);
      expect_sig("idle irq", irq_cpu, 0);
      expect_sig("idle busy", busy, 0);
      start = 1; next_tid = 8'(17 * n + 3);
      @(negedge clk);
      start = 0; next_tid = 0;
      expect_sig("irq raised", irq_cpu, 1);
      expect_sig("busy", busy, 1);
      checks++;
      if (next_task_id != 8'(17 * n + 3)) failures++;
      repeat (n) begin
        @(negedge clk);
        expect_sig("irq held", irq_cpu, 1);
      end
      hs_tsw = 1;
      @(negedge clk);
      expect_sig("irq dropped", irq_cpu, 0);
      expect_sig("not done", done, 0);
      repeat (3) @(negedge clk);
      expect_sig("still saving", done, 0);
      hs_tsw = 0;
      @(negedge clk);
      expect_sig("done", done, 1);
      repeat (wait_ack) begin
        @(negedge clk);
        expect_sig("done held", done, 1);
      end
      done_ack = 1;
      @(negedge clk);
      done_ack = 0;
      expect_sig("done cleared", done, 0);
      expect_sig("not busy", busy, 0);
      checks++;
      if (next_task_id != 8'(17 * n + 3)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
