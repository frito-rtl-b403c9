// divider_tb: checks the sequential divider against the / and % operators for
// the layout divisions the video multiplexer makes and for random operands,
// including division by zero, and checks that each division takes WIDTH
// cycles from start to done.
module divider_tb;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic start = 0, busy, done;
  logic [15:0] n = 0, d = 0, q, r;

  divider #(.WIDTH(16)) dut (.clk(clk), .rst(rst), .start(start), .dividend(n), .divisor(d),
                             .quotient(q), .remainder(r), .busy(busy), .done(done));

  int checks = 0, failures = 0;
  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  task automatic divide(input int a, input int b);
    int cyc = 0;
    @(negedge clk); n = 16'(a); d = 16'(b); start = 1;
    @(negedge clk); start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    check("cycles", cyc, 17);
    if (b != 0) begin
      check($sformatf("%0d / %0d", a, b), q, a / b);
      check($sformatf("%0d %% %0d", a, b), r, a % b);
    end else begin
      check("div by zero quotient", q, 16'hFFFF);
      check("div by zero remainder", r, a);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk); rst = 0;
    divide(1280, 384); divide(720, 192); divide(128, 7); divide(144, 7);
    divide(1280, 64);  divide(0, 5);     divide(65535, 1); divide(65535, 65535);
    divide(77, 0);
    for (int k = 0; k < 100; k++) divide($urandom_range(0, 65535), $urandom_range(1, 65535));
    for (int k = 0; k < 100; k++) divide($urandom_range(0, 65535), $urandom_range(1, 300));
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
