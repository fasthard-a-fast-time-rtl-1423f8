// fh_timebase: the real-time clock of the kernel.
//
// A prescaler counts TICK_CYCLES clock cycles and then advances the tick
// counter `now` by one and pulses `tick` for one cycle. All delays,
// time-outs and periods of the kernel are counted in these ticks. `now`
// wraps around; the timer blocks compare times with wrap-safe arithmetic.
// The original description speaks of a clock tick but gives no period:
// 1000 cycles per tick (1 ms at 1 MHz, 0.1 ms at 10 MHz) is this design's
// choice.
module fh_timebase #(
  parameter int unsigned TICK_CYCLES = 1000,  // clock cycles per tick
  parameter int unsigned TW          = 16     // tick counter width
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic          tick,   // one-cycle pulse when `now` advances
  output logic [TW-1:0] now     // ticks since reset, wrapping
);
  localparam int unsigned PW = (TICK_CYCLES > 1) ? $clog2(TICK_CYCLES) : 1;

  logic [PW-1:0] pre;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pre  <= '0;
      now  <= '0;
      tick <= 1'b0;
    end else if (pre == PW'(TICK_CYCLES - 1)) begin
      pre  <= '0;
      now  <= now + 1'b1;
      tick <= 1'b1;
    end else begin
      pre  <= pre + 1'b1;
      tick <= 1'b0;
    end
  end
endmodule
