// tb_fh_timeout_unit: arms timers for many tasks with random delays, steps
// the tick counter by hand and checks that each expiry is offered once, no
// earlier than its deadline and no later than one scan (256 cycles plus the
// offers ahead of it) after; disarming and re-arming cancel offers.
`timescale 1ns/1ps
module tb_fh_timeout_unit;
  localparam int NT = 256;
  localparam int TICK = 400;    // cycles per tick in this test (> one scan)
  logic clk = 0, rst_n = 0;
  logic [15:0] now;
  logic cmd_valid, cmd_arm, exp_valid, exp_ack;
  logic [7:0] cmd_tid, exp_tid;
  logic [15:0] cmd_delay;
  int checks = 0, failures = 0;
  int deadline [NT];
  bit armed [NT];
  int fired [NT];
  int cyc = 0;

  fh_timeout_unit #(.NTASKS(NT), .TW(16)) dut (.clk, .rst_n, .now, .cmd_valid, .cmd_arm,
    .cmd_tid, .cmd_delay, .exp_valid, .exp_tid, .exp_ack);

  always #5 clk = ~clk;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // tick counter and automatic acknowledge
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst_n) now <= '0;
    else if (cyc % TICK == TICK - 1) now <= now + 1'b1;
  end
  assign exp_ack = exp_valid;

  always @(posedge clk) if (rst_n && exp_valid) begin
    automatic int t = exp_tid;
    checks++;
    if (!armed[t]) begin
      failures++;
      $display("offer for task %0d that is not armed", t);
    end else if (int'(now) < deadline[t]) begin
      failures++;
      $display("task %0d expired at %0d before deadline %0d", t, now, deadline[t]);
    end else if (int'(now) > deadline[t] + 1) begin
      failures++;
      $display("task %0d expired at %0d, deadline %0d", t, now, deadline[t]);
    end
    armed[t] = 0;
    fired[t]++;
  end

  task automatic cmd(input int t, input bit arm, input int d);
    @(negedge clk);
    cmd_valid = 1; cmd_arm = arm; cmd_tid = 8'(t); cmd_delay = 16'(d);
    if (arm) begin armed[t] = 1; deadline[t] = int'(now) + d; end
    else armed[t] = 0;
    @(negedge clk);
    cmd_valid = 0;
  endtask

  initial begin
    cmd_valid = 0; cmd_arm = 0; cmd_tid = 0; cmd_delay = 0;
    for (int i = 0; i < NT; i++) begin armed[i] = 0; fired[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < NT; t += 3) cmd(t, 1, $urandom_range(1, 20));
    cmd(9, 0, 0);                   // disarm
    cmd(12, 1, 40);                 // re-arm with a longer delay
    cmd(15, 1, 0);                  // zero delay: expires at once
    repeat (50 * TICK) @(posedge clk);
    for (int t = 0; t < NT; t += 3) begin
      checks++;
      if (t == 9) begin
        if (fired[t] != 0) begin failures++; $display("disarmed task 9 fired"); end
      end else if (fired[t] != 1) begin
        failures++;
        $display("task %0d fired %0d times", t, fired[t]);
      end
    end
    checks++;
    if (fired[1] != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
