// chip8_tick_gen: the emulated clocks of the Chip-8 system, derived from the
// 100 MHz system clock.
//
// tick pulses for one cycle every tick_period cycles and starts one processor
// round (one instruction per active instance). The design runs the emulated
// instruction clock at 500 Hz, tick_period = 200000 at 100 MHz, and lets the
// user retune it; here the period is an input. timer_tick pulses every
// TIMER_PERIOD cycles (60 Hz by default) and paces the delay and sound timers;
// the 60 Hz rate comes from the Chip-8 definition, not from this design's
// description. A tick_period of 0 is treated as 1.
module chip8_tick_gen #(
  parameter int unsigned TIMER_PERIOD = 1_666_667
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [19:0] tick_period,
  output logic        tick,
  output logic        timer_tick
);

  logic [19:0] cnt;
  logic [$clog2(TIMER_PERIOD+1)-1:0] tcnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt        <= '0;
      tcnt       <= '0;
      tick       <= 1'b0;
      timer_tick <= 1'b0;
    end else begin
      tick       <= 1'b0;
      timer_tick <= 1'b0;
      if (cnt + 20'd1 >= tick_period) begin
        cnt  <= '0;
        tick <= 1'b1;
      end else begin
        cnt <= cnt + 20'd1;
      end
      if (int'(tcnt) + 1 >= int'(TIMER_PERIOD)) begin
        tcnt       <= '0;
        timer_tick <= 1'b1;
      end else begin
        tcnt <= tcnt + 1'b1;
      end
    end
  end

endmodule
