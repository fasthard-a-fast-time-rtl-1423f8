// tb_fh_period_unit: gives several tasks periods, acknowledges every
// release and checks that the k-th release of a task comes at tick
// start + k * period (at most one tick late), that acknowledging late does
// not make the releases drift, and that switching off stops them.
`timescale 1ns/1ps
module tb_fh_period_unit;
  localparam int NT = 256;
  localparam int TICK = 400;
  logic clk = 0, rst_n = 0;
  logic [15:0] now;
  logic cmd_valid, cmd_on, rel_valid, rel_ack;
  logic [7:0] cmd_tid, rel_tid;
  logic [15:0] cmd_period;
  int checks = 0, failures = 0;
  int start [NT], per [NT], count [NT];
  bit on [NT];
  int cyc = 0;
  bit slow_ack = 0;

  fh_period_unit #(.NTASKS(NT), .TW(16)) dut (.clk, .rst_n, .now, .cmd_valid, .cmd_on,
    .cmd_tid, .cmd_period, .rel_valid, .rel_tid, .rel_ack);

  always #5 clk = ~clk;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst_n) now <= '0;
    else if (cyc % TICK == TICK - 1) now <= now + 1'b1;
  end
  // acknowledge at once, or after 3 cycles while slow_ack is set
  int hold = 0;
  always @(posedge clk) begin
    if (rel_valid && (!slow_ack || hold == 3)) hold = 0;
    else if (rel_valid) hold++;
  end
  assign rel_ack = rel_valid && (!slow_ack || hold == 3);

  always @(posedge clk) if (rst_n && rel_ack) begin
    automatic int t = rel_tid;
    automatic int expect_tick;
    count[t]++;
    expect_tick = start[t] + count[t] * per[t];
    checks++;
    if (!on[t]) begin
      failures++;
      $display("release of task %0d that is off", t);
    end else if (int'(now) < expect_tick || int'(now) > expect_tick + 1) begin
      failures++;
      $display("task %0d release %0d at tick %0d, expected %0d", t, count[t], now, expect_tick);
    end
  end

  task automatic cmd(input int t, input bit o, input int p);
    @(negedge clk);
    cmd_valid = 1; cmd_on = o; cmd_tid = 8'(t); cmd_period = 16'(p);
    on[t] = o && p != 0; start[t] = int'(now); per[t] = p; count[t] = 0;
    @(negedge clk);
    cmd_valid = 0;
  endtask

  initial begin
    cmd_valid = 0; cmd_on = 0; cmd_tid = 0; cmd_period = 0;
    for (int i = 0; i < NT; i++) begin on[i] = 0; count[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    cmd(3, 1, 2);
    cmd(100, 1, 5);
    cmd(255, 1, 7);
    cmd(7, 1, 0);          // period 0: off
    repeat (20 * TICK) @(posedge clk);
    slow_ack = 1;
    repeat (20 * TICK) @(posedge clk);
    slow_ack = 0;
    cmd(100, 0, 0);        // off
    repeat (10 * TICK) @(posedge clk);
    checks++;
    if (count[3] < 23 || count[255] < 6) begin
      failures++;
      $display("too few releases: %0d %0d", count[3], count[255]);
    end
    checks++;
    if (count[7] != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
