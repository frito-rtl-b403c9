// pdm_tb: holds the PDM input at a series of levels and checks that the
// number of ones in every window of 256 cycles is the level, to within one.
module pdm_tb;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [7:0] level = 0;
  logic out;
  pdm dut (.clk(clk), .rst(rst), .level(level), .pdm_out(out));

  int checks = 0, failures = 0;
  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    int ones;
    int lv [8] = '{0, 1, 64, 128, 200, 255, 37, 3};
    repeat (3) @(negedge clk); rst = 0;
    foreach (lv[n]) begin
      level = 8'(lv[n]);
      repeat (2) @(negedge clk);
      for (int w = 0; w < 3; w++) begin
        ones = 0;
        for (int k = 0; k < 256; k++) begin @(negedge clk); ones += int'(out); end
        check($sformatf("level %0d: ones %0d", lv[n], ones), int'(ones >= lv[n] - 1 && ones <= lv[n] + 1), 1);
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
