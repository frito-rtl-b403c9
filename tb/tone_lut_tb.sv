// tone_lut_tb: checks all 16 phase increments against
// round((155 + 85*t) * 65536 / 3000) computed in floating point, and that the
// frequency each increment produces at a 3 kHz sample rate is within 0.05 Hz
// of the intended tone. Tones 2 and 7 must give 325 Hz and 750 Hz (increments
// 7100 and 16384).
module tone_lut_tb;
  logic [3:0]  tone;
  logic [15:0] inc;
  tone_lut dut (.tone(tone), .phase_inc(inc));

  int checks = 0, failures = 0;
  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    real f, fo;
    for (int t = 0; t < 16; t++) begin
      tone = 4'(t);
      #1;
      f  = 155.0 + 85.0 * t;
      check($sformatf("tone %0d increment", t), inc, $rtoi($floor(f * 65536.0 / 3000.0 + 0.5)));
      fo = inc * 3000.0 / 65536.0;
      check($sformatf("tone %0d frequency", t), int'(fo - f < 0.05 && f - fo < 0.05), 1);
    end
    tone = 4'd2; #1 check("325 Hz tone", inc, 7100);
    tone = 4'd7; #1 check("750 Hz tone", inc, 16384);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
