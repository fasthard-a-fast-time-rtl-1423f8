// tb_fh_timebase: checks that the tick counter advances by one every
// TICK_CYCLES clock cycles and that `tick` pulses exactly then.
`timescale 1ns/1ps
module tb_fh_timebase;
  localparam int unsigned TC = 7;
  logic clk = 0, rst_n = 0;
  logic tick;
  logic [15:0] now;
  int checks = 0, failures = 0;
  int cyc = 0;

  fh_timebase #(.TICK_CYCLES(TC), .TW(16)) dut (.clk, .rst_n, .tick, .now);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (cyc = 1; cyc <= TC * 40; cyc++) begin
      @(posedge clk); #1;
      checks++;
      if (now != 16'(cyc / TC)) begin
        failures++;
        $display("cycle %0d: now=%0d expected %0d", cyc, now, cyc / TC);
      end
      checks++;
      if (tick != (cyc % TC == 0)) begin
        failures++;
        $display("cycle %0d: tick=%0b", cyc, tick);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
