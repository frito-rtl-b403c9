// volume_control_tb: checks out = (in * volume) / 16, one cycle after the
// inputs, for all volumes and random samples, including silence at volume 0.
module volume_control_tb;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [7:0] in = 0, out;
  logic [3:0] vol = 0;
  volume_control dut (.clk(clk), .in(in), .volume(vol), .out(out));

  int checks = 0, failures = 0;
  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    for (int v = 0; v < 16; v++)
      for (int k = 0; k < 20; k++) begin
        @(negedge clk); vol = 4'(v); in = (k == 0) ? 8'd255 : 8'($urandom);
        @(negedge clk);
        check($sformatf("in %0d vol %0d", in, v), out, (int'(in) * v) / 16);
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
