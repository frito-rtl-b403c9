// keypad_scanner_tb: connects the scanner to a model of the 4x4 key matrix
// with pull-up rows (a row reads 0 when a pressed key joins it to a column
// driven 0) and checks, for random sets of pressed keys, that exactly one
// column is driven low at a time, that every column is visited once in each
// 8-cycle scan, and that keys_pressed matches the pressed keys one full scan
// (8 cycles) after the keys settle.
module keypad_scanner_tb;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [3:0]  rows, cols;
  logic [15:0] keys, pressed = '0;

  keypad_scanner dut (.clk(clk), .rst(rst), .rows(rows), .cols(cols), .keys_pressed(keys));

  always_comb
    for (int r = 0; r < 4; r++) begin
      rows[r] = 1'b1;
      for (int c = 0; c < 4; c++) if (pressed[4*r + c] && !cols[c]) rows[r] = 1'b0;
    end

  int checks = 0, failures = 0;
  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0h expected %0h", what, got, exp); end
  endtask

  initial begin
    logic [3:0] seen;
    repeat (3) @(negedge clk); rst = 0;
    // column drive pattern over one scan
    seen = '0;
    for (int k = 0; k < 8; k++) begin
      @(negedge clk);
      check("one column low", int'($countones(~cols)), 1);
      seen |= ~cols;
    end
    check("all columns visited in 8 cycles", seen, 4'hF);
    for (int t = 0; t < 100; t++) begin
      @(negedge clk);
      pressed = (t < 16) ? 16'(1 << t) : 16'($urandom);
      repeat (9) @(negedge clk);
      check($sformatf("keys %0h", pressed), keys, pressed);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
