// sawtooth_wave_tb: steps the sawtooth generator with sample triggers at several phase
// increments, keeps its own 16-bit reference phase, and checks after every
// sample that amp_out equals the ideal sawtooth evaluated at the top six phase
// bits. It also checks that the output does not move between triggers.
module sawtooth_wave_tb;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic trigger = 0;
  logic [15:0] inc = 0;
  logic [7:0] amp;

  sawtooth_wave dut (.clk(clk), .rst(rst), .trigger(trigger), .phase_inc(inc), .amp_out(amp));

  int checks = 0, failures = 0;
  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  function automatic logic [7:0] ideal(input int i);
    return 8'(i * 4 + i / 16);
  endfunction

  initial begin
    logic [15:0] phase = 0;
    logic [7:0]  held;
    int incs [4] = '{1092, 15947, 4369, 27307};
    repeat (3) @(negedge clk); rst = 0;
    foreach (incs[n]) begin
      inc = 16'(incs[n]);
      for (int k = 0; k < 150; k++) begin
        @(negedge clk); trigger = 1; phase += inc;
        @(negedge clk); trigger = 0;
        @(negedge clk);
        check($sformatf("inc %0d sample %0d", incs[n], k), amp, ideal(int'(phase[15:10])));
        held = amp;
        repeat (3) @(negedge clk);
        check("held between triggers", amp, held);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
