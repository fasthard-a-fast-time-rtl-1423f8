// tb_fh_ready_queues: random pushes and pops on the eight ready queues,
// compared with a queue-per-priority model; also fills one queue with all
// 256 tasks.
`timescale 1ns/1ps
module tb_fh_ready_queues;
  logic clk = 0, rst_n = 0;
  logic push, pop;
  logic [2:0] push_prio, pop_prio, head_prio;
  logic [7:0] push_tid, head_tid;
  logic [7:0] nonempty;
  int checks = 0, failures = 0;
  int unsigned model [8][$];

  fh_ready_queues #(.NTASKS(256), .NPRIO(8)) dut (.clk, .rst_n, .push, .push_prio,
    .push_tid, .pop, .pop_prio, .head_prio, .head_tid, .nonempty);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int p = 0; p < 8; p++) begin
      head_prio = 3'(p);
      #0.1;
      checks++;
      if (nonempty[p] != (model[p].size() != 0)) begin
        failures++;
        $display("prio %0d: nonempty=%0b model size %0d", p, nonempty[p], model[p].size());
      end
      if (model[p].size() != 0) begin
        checks++;
        if (head_tid != 8'(model[p][0])) begin
          failures++;
          $display("prio %0d: head=%0d model %0d", p, head_tid, model[p][0]);
        end
      end
    end
  endtask

  initial begin
    push = 0; pop = 0; push_prio = 0; pop_prio = 0; push_tid = 0; head_prio = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      compare();
      push = $urandom_range(0, 1) == 1;
      push_prio = 3'($urandom_range(0, 7));
      push_tid = 8'($urandom_range(0, 255));
      pop_prio = 3'($urandom_range(0, 7));
      pop = model[pop_prio].size() != 0 && $urandom_range(0, 2) != 0;
      @(posedge clk);
      #0.1;
      if (pop)  void'(model[pop_prio].pop_front());
      if (push) model[push_prio].push_back(push_tid);
      push = 0; pop = 0;
    end
    // drain, then fill queue 5 completely
    for (int p = 0; p < 8; p++)
      while (model[p].size() != 0) begin
        @(negedge clk); pop = 1; pop_prio = 3'(p);
        @(posedge clk); #0.1; void'(model[p].pop_front()); pop = 0;
      end
    for (int t = 0; t < 256; t++) begin
      @(negedge clk); push = 1; push_prio = 3'd5; push_tid = 8'(255 - t);
      @(posedge clk); #0.1; model[5].push_back(255 - t); push = 0;
    end
    @(negedge clk);
    compare();
    for (int t = 0; t < 256; t++) begin
      @(negedge clk); head_prio = 3'd5; #0.1;
      checks++;
      if (head_tid != 8'(255 - t)) failures++;
      pop = 1; pop_prio = 3'd5;
      @(posedge clk); #0.1; pop = 0;
    end
    @(negedge clk);
    checks++;
    if (nonempty != 8'h00) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
