// chip8_audio_tb: runs the audio module with the sample divider shortened to
// DECIM = 16 clocks. It keeps its own count of samples and its own 16-bit
// phase, and checks in the middle of every sample period that amp_out is the
// ideal selected wave (sine, triangle, square, sawtooth) at that phase, that
// level is amp_out scaled by volume/16 while active_in is high and zero while
// it is low (with no PDM ones), and, over 3000 samples (one second at 3 kHz),
// that the square wave completes the number of periods of the chosen tone.
module chip8_audio_tb;
  localparam int DECIM = 16;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [1:0] timbre = 0;
  logic [3:0] tone = 0, volume = 15;
  logic active = 1;
  logic [7:0] amp, level;
  logic out;

  chip8_audio #(.DECIM(DECIM)) dut (
    .clk_audio(clk), .rst(rst), .timbre(timbre), .tone(tone), .volume(volume),
    .active_in(active), .amp_out(amp), .level(level), .audio_out(out)
  );

  int checks = 0, failures = 0;
  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  function automatic int ideal(input int tb_timbre, input int i);
    int t;
    unique case (tb_timbre)
      0: return $rtoi($floor(127.5 + 127.5 * $sin(2.0 * 3.14159265358979 * i / 64.0) + 0.5));
      1: begin t = (i < 32) ? i : 63 - i; return t * 8 + t / 4; end
      2: return (i < 32) ? 255 : 0;
      default: return i * 4 + i / 16;
    endcase
  endfunction

  function automatic int inc_of(input int t);
    return $rtoi($floor((155.0 + 85.0 * t) * 65536.0 / 3000.0 + 0.5));
  endfunction

  // Sample bookkeeping: the first trigger takes effect at posedge 18 after
  // reset, then one every DECIM cycles.
  int edges = 0;
  logic [15:0] phase = 0;
  always @(posedge clk) if (!rst) begin
    edges++;
    if (edges >= 18 && (edges - 18) % DECIM == 0) phase += 16'(inc_of(int'(tone)));
  end

  initial begin
    int bad_amp, bad_lvl, periods, pdm_ones;
    logic [7:0] prev;
    repeat (3) @(negedge clk); rst = 0;
    for (int tb_timbre = 0; tb_timbre < 4; tb_timbre++) begin
      timbre = 2'(tb_timbre);
      for (int t = 0; t < 16; t += 5) begin
        // change settings right after a sample so the reference keeps step
        while (!(edges >= 18 && (edges - 18) % DECIM == 1)) @(negedge clk);
        tone = 4'(t);
        volume = 4'(3 + t % 13);
        bad_amp = 0; bad_lvl = 0;
        for (int s = 0; s < 200; s++) begin
          repeat (DECIM / 2) @(negedge clk);
          if (int'(amp) != ideal(tb_timbre, int'(phase[15:10]))) bad_amp++;
          if (int'(level) != (int'(amp) * int'(volume)) / 16) bad_lvl++;
          repeat (DECIM / 2) @(negedge clk);
        end
        check($sformatf("timbre %0d tone %0d wave", tb_timbre, t), bad_amp, 0);
        check($sformatf("timbre %0d tone %0d volume", tb_timbre, t), bad_lvl, 0);
      end
    end
    // tone frequency: square-wave periods in 3000 samples
    timbre = 2'd2;
    for (int n = 0; n < 2; n++) begin
      int t;
      t = (n == 0) ? 3 : 7;
      tone = 4'(t);
      repeat (DECIM * 4) @(negedge clk);
      periods = 0; prev = amp;
      for (int k = 0; k < 3000 * DECIM; k++) begin
        @(negedge clk);
        if (prev == 0 && amp == 255) periods++;
        prev = amp;
      end
      check($sformatf("tone %0d: %0d periods per second", t, periods),
            int'(periods >= 155 + 85 * t - 1 && periods <= 155 + 85 * t + 1), 1);
    end
    // gating by active_in
    active = 0;
    repeat (4) @(negedge clk);
    bad_lvl = 0; pdm_ones = 0;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      if (level != 0) bad_lvl++;
      pdm_ones += int'(out);
    end
    check("silent while inactive", bad_lvl, 0);
    check("no PDM pulses while inactive", pdm_ones, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
