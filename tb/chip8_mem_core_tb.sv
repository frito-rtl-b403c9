// chip8_mem_core_tb: checks one memory core: its build-time contents (font,
// program from the ROM file, PC = 0x200), the two-cycle read latency of both
// ports, read-first behaviour on port A and that port B, on its own clock,
// sees what port A wrote.
module chip8_mem_core_tb;
  import chip8_pkg::*;

  logic clk_a = 0, clk_b = 0;
  always #5 clk_a = ~clk_a;
  always #7 clk_b = ~clk_b;

  logic we = 0;
  logic [CORE_AW-1:0] addr_a = 0, addr_b = 0;
  logic [7:0] din = 0, dout_a, dout_b;

  chip8_mem_core #(.ROM_FILE("rtl/chip8_demo_rom.hex")) dut (
    .clk_a(clk_a), .we_a(we), .addr_a(addr_a), .din_a(din), .dout_a(dout_a),
    .clk_b(clk_b), .addr_b(addr_b), .dout_b(dout_b)
  );

  int checks = 0, failures = 0;
  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0h expected %0h", what, got, exp); end
  endtask

  task automatic read_a(input int a, output logic [7:0] d);
    @(negedge clk_a); addr_a = CORE_AW'(a); we = 0;
    @(posedge clk_a); @(posedge clk_a); #1 d = dout_a;
  endtask

  logic [7:0] d;
  logic [7:0] model [CORE_BYTES];

  initial begin
    // font digit 0 and F, first demo-ROM instruction 00E0, PC = 0x0200
    read_a(0, d);   check("font[0]", d, 'hF0);
    read_a(1, d);   check("font[1]", d, 'h90);
    read_a(79, d);  check("font[79]", d, 'h80);
    read_a(80, d);  check("after font", d, 0);
    read_a(12'h200, d); check("rom[0]", d, 'h00);
    read_a(12'h201, d); check("rom[1]", d, 'hE0);
    read_a(12'h203, d); check("rom[3]", d, 'h05);
    read_a(RAM_BYTES + ST_PC, d);     check("PC hi", d, 'h02);
    read_a(RAM_BYTES + ST_PC + 1, d); check("PC lo", d, 'h00);
    read_a(CORE_BYTES - 1, d);        check("last byte", d, 0);
    // latency: data is not there after one cycle, is after two
    @(negedge clk_a); addr_a = 13'd1; @(posedge clk_a);
    @(negedge clk_a); addr_a = 13'd0; @(posedge clk_a); #1 check("latency 2: first", dout_a, 'h90);
    @(posedge clk_a); #1 check("latency 2: second", dout_a, 'hF0);
    // random writes through A, read back through A and B
    for (int i = 0; i < int'(CORE_BYTES); i++) model[i] = 8'h00;
    for (int k = 0; k < 200; k++) begin
      int a = $urandom_range(0, CORE_BYTES - 1);
      @(negedge clk_a); addr_a = CORE_AW'(a); din = 8'($urandom); we = 1; model[a] = din;
    end
    @(negedge clk_a); we = 0;
    for (int k = 0; k < 200; k++) begin
      int a = $urandom_range(0, CORE_BYTES - 1);
      if (a >= 80 && !(a >= 'h200 && a < 'h260) && a != RAM_BYTES + ST_PC) begin
        read_a(a, d);
        if (model[a] != 0) check($sformatf("A readback %0h", a), d, model[a]);
        @(negedge clk_b); addr_b = CORE_AW'(a);
        @(posedge clk_b); @(posedge clk_b); #1;
        check($sformatf("B readback %0h", a), dout_b, d);
      end
    end
    // read-first on port A
    @(negedge clk_a); addr_a = 13'd300; din = 8'h11; we = 1;
    @(negedge clk_a); din = 8'h22;
    @(negedge clk_a); we = 0;
    @(posedge clk_a); #1;
    check("read-first", dout_a, 'h11);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk_a);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
