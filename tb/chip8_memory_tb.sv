// chip8_memory_tb: checks the memory module with three instances: fixed
// priority processor > video > debug on the shared port, the ready/valid
// timing (valid exactly two cycles after a read is taken, routed to the right
// requester), that processor and video requests reach the core picked by
// core_sel and debug requests the core picked by debug_core, and that the
// multiplexer port reads video-buffer byte b of instance i at i*256 + b.
// Instance 2 is loaded with a second program file (tb/chip8_memory_alt.hex),
// the others with the default program.
module chip8_memory_tb;
  import chip8_pkg::*;

  localparam int NI = 3;
  logic clk = 0, clk_pixel = 0, rst = 1;
  always #5 clk = ~clk;
  always #6.7 clk_pixel = ~clk_pixel;

  logic [5:0] core_sel = 0, debug_core = 0;
  mem_req_t   preq = '0, vreq = '0, dreq = '0;
  logic       prdy, pval, vrdy, vval, drdy, dval;
  logic [7:0] mdata, hdata;
  logic [15:0] haddr = 0;

  chip8_memory #(.NUM_INST(NI), .ROM_FILE_ALT("tb/chip8_memory_alt.hex"),
                 .ROM_ALT_MASK(64'b100)) dut (
    .clk(clk), .rst(rst), .core_sel(core_sel), .debug_core(debug_core),
    .proc_req(preq), .proc_mem_ready(prdy), .proc_mem_valid(pval),
    .video_req(vreq), .video_mem_ready(vrdy), .video_mem_valid(vval),
    .debug_req(dreq), .debug_mem_ready(drdy), .debug_mem_valid(dval),
    .mem_data(mdata), .clk_pixel(clk_pixel), .hdmi_mem_addr(haddr), .hdmi_mem_data(hdata)
  );

  int checks = 0, failures = 0;
  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0h expected %0h", what, got, exp); end
  endtask

  function automatic mem_req_t wr(input mem_type_t t, input int a, input int d);
    return '{1'b1, 1'b1, t, 12'(a), 8'(d)};
  endfunction
  function automatic mem_req_t rd(input mem_type_t t, input int a);
    return '{1'b1, 1'b0, t, 12'(a), 8'd0};
  endfunction

  initial begin
    repeat (3) @(negedge clk); rst = 0;
    // write a distinct byte into VRAM byte 5 and RAM 0x300 of each core
    for (int c = 0; c < NI; c++) begin
      @(negedge clk); core_sel = 6'(c); preq = wr(MEM_STATE, 5, 'hA0 + c);
      #1 check("write taken", int'(prdy), 1);
      @(negedge clk); preq = wr(MEM_RAM, 'h300, 'h50 + c);
    end
    @(negedge clk); preq = '0;
    // all three request at once: processor wins, then video, then debug
    core_sel = 6'd1; debug_core = 6'd2;
    preq = rd(MEM_RAM, 'h300); vreq = rd(MEM_STATE, 5); dreq = rd(MEM_RAM, 'h300);
    #1 check("cycle 1 grants", {prdy, vrdy, drdy}, 3'b100);
    @(negedge clk); preq = '0;
    #1 check("cycle 2 grants", {prdy, vrdy, drdy}, 3'b010);
    check("processor valid after 1 cycle", int'(pval), 0);
    @(negedge clk); vreq = '0;
    #1 check("cycle 3 grants", {prdy, vrdy, drdy}, 3'b001);
    check("processor valid after 2 cycles", int'(pval), 1);
    check("processor data (core 1)", mdata, 'h51);
    @(negedge clk); dreq = '0;
    #1 check("video valid", int'(vval), 1);
    check("video data (core 1 VRAM)", mdata, 'hA1);
    check("no processor valid", int'(pval), 0);
    @(negedge clk);
    #1 check("debug valid", int'(dval), 1);
    check("debug data (core 2)", mdata, 'h52);
    @(negedge clk);
    #1 check("idle: no valid", int'(pval | vval | dval), 0);
    // back-to-back pipelined reads by the processor
    core_sel = 6'd0;
    @(negedge clk); preq = rd(MEM_STATE, ST_PC);
    @(negedge clk); preq = rd(MEM_STATE, ST_PC + 1);
    @(negedge clk); preq = rd(MEM_RAM, 0);
    #1 check("pipelined 1 valid", int'(pval), 1); check("PC hi", mdata, 'h02);
    @(negedge clk); preq = '0;
    #1 check("pipelined 2 valid", int'(pval), 1); check("PC lo", mdata, 'h00);
    @(negedge clk);
    #1 check("pipelined 3 valid", int'(pval), 1); check("font byte", mdata, 'hF0);
    // program files: 0x200.. holds 00 E0 in the default program,
    // 12 34 in the second file, which only instance 2 gets
    for (int c = 0; c < NI; c++) begin
      debug_core = 6'(c);
      @(negedge clk); dreq = rd(MEM_RAM, 12'h200);
      while (!drdy) begin @(negedge clk); end
      dreq = rd(MEM_RAM, 12'h201);
      @(negedge clk); dreq = '0;
      #1 check($sformatf("program byte 0x200 of instance %0d", c), mdata, (c == 2) ? 'h12 : 'h00);
      @(negedge clk);
      #1 check($sformatf("program byte 0x201 of instance %0d", c), mdata, (c == 2) ? 'h34 : 'hE0);
    end
    // multiplexer port
    for (int c = 0; c < NI; c++) begin
      @(negedge clk_pixel); haddr = 16'(c * 256 + 5);
      @(posedge clk_pixel); @(posedge clk_pixel); #1;
      check($sformatf("port B instance %0d", c), hdata, 'hA0 + c);
    end
    @(negedge clk_pixel); haddr = 16'(1 * 256 + 6);
    @(posedge clk_pixel); @(posedge clk_pixel); #1;
    check("port B other byte", hdata, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
