// chip8_tick_gen_tb: checks that tick pulses once every tick_period cycles
// (including the 500 Hz default, 200000 cycles at 100 MHz) and follows a
// change of tick_period, and that timer_tick pulses every TIMER_PERIOD cycles
// (shortened here to 1000).
module chip8_tick_gen_tb;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [19:0] period = 20'd200000;
  logic tick, tmr;
  chip8_tick_gen #(.TIMER_PERIOD(1000)) dut (.clk(clk), .rst(rst), .tick_period(period),
                                              .tick(tick), .timer_tick(tmr));

  int checks = 0, failures = 0;
  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  int last_tmr = -1, n_tmr = 0, cyc = 0, bad_tmr = 0;
  always @(posedge clk) begin
    cyc++;
    if (tmr) begin
      if (last_tmr >= 0 && cyc - last_tmr != 1000) bad_tmr++;
      last_tmr = cyc; n_tmr++;
    end
  end

  task automatic measure(input int p);
    int t0;
    @(negedge clk); period = 20'(p);
    @(posedge tick); @(posedge tick);       // let a changed period take effect
    for (int k = 0; k < 3; k++) begin
      @(posedge tick); t0 = cyc;
      @(posedge tick);
      check($sformatf("tick period %0d", p), cyc - t0, p);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk); rst = 0;
    measure(200000);
    measure(37);
    measure(2);
    measure(5000);
    check("timer ticks seen", int'(n_tmr > 100), 1);
    check("timer period", bad_tmr, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
