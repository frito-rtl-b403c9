// chip8_video_tb: drives the video module with clear-screen and many random
// draw-sprite commands against a behavioural memory (two-cycle reads, random
// stalls) and compares the whole video buffer and the collision flag after
// every command with a pixel-level reference model (XOR drawing, clipping at
// the right and bottom edges). Also checks that a clear takes about 256
// cycles, in line with the ~270 cycles the complete CLS instruction takes.
module chip8_video_tb;
  import chip8_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic        clr = 0, drw = 0;
  logic [11:0] saddr = 0; logic [5:0] sx = 0; logic [4:0] sy = 0; logic [3:0] sh = 0;
  logic        coll, done;
  mem_req_t    req;
  logic        ready, valid;
  logic [7:0]  rdata;

  chip8_video dut (
    .clk(clk), .rst(rst), .video_clear_buffer(clr), .video_draw_sprite(drw),
    .video_sprite_addr(saddr), .video_sprite_x(sx), .video_sprite_y(sy),
    .video_sprite_height(sh), .video_collision(coll), .video_done_drawing(done),
    .video_req(req), .video_mem_ready(ready), .video_mem_valid(valid), .mem_data(rdata)
  );

  logic [7:0] mem [CORE_BYTES];
  logic       v_p [2];
  logic [7:0] d_p [2];
  bit         stall_en = 0;
  always_comb ready = req.valid_req && (!stall_en || ($urandom_range(0, 2) != 0));
  always_ff @(posedge clk) begin
    v_p[0] <= ready && !req.we;
    d_p[0] <= mem[core_addr(req.mem_type, req.addr)];
    v_p[1] <= v_p[0];
    d_p[1] <= d_p[0];
    if (ready && req.we) mem[core_addr(req.mem_type, req.addr)] <= req.data;
  end
  assign valid = v_p[1];
  assign rdata = d_p[1];

  bit screen [32][64];
  int checks = 0, failures = 0;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  task automatic compare_screen(input string what);
    int bad = 0;
    for (int r = 0; r < 32; r++)
      for (int c = 0; c < 64; c++)
        if (mem[RAM_BYTES + r*8 + c/8][7 - c%8] != screen[r][c]) bad++;
    check({what, " screen mismatches"}, bad, 0);
  endtask

  task automatic run(output int cycles);
    cycles = 0;
    @(negedge clk); clr = 0; drw = 0;
    while (!done) begin @(negedge clk); cycles++; end
  endtask

  task automatic draw(input int a, input int x, input int y, input int h);
    int cyc; bit exp_coll = 0;
    for (int r = 0; r < h; r++)
      for (int b = 0; b < 8; b++)
        if (y + r < 32 && x + b < 64 && mem[a + r][7 - b]) begin
          if (screen[y + r][x + b]) exp_coll = 1;
          screen[y + r][x + b] ^= 1'b1;
        end
    @(negedge clk); saddr = 12'(a); sx = 6'(x); sy = 5'(y); sh = 4'(h); drw = 1;
    run(cyc);
    check($sformatf("collision x=%0d y=%0d h=%0d", x, y, h), int'(coll), int'(exp_coll));
    compare_screen("draw");
  endtask

  initial begin
    int cyc;
    for (int i = 0; i < int'(CORE_BYTES); i++) mem[i] = 8'($urandom);
    repeat (3) @(negedge clk); rst = 0;
    // clear: all 256 bytes go to zero
    @(negedge clk); clr = 1;
    run(cyc);
    for (int r = 0; r < 32; r++) for (int c = 0; c < 64; c++) screen[r][c] = 0;
    compare_screen("clear");
    check("clear cycles in [256,270]", int'(cyc >= 256 && cyc <= 270), 1);
    $display("clear took %0d cycles", cyc);
    // directed: aligned, unaligned, clipped right, clipped bottom, collision
    draw(12'h100, 8, 0, 5);
    draw(12'h105, 13, 4, 4);
    draw(12'h105, 13, 4, 4);          // erases again: collision
    draw(12'h110, 60, 10, 3);         // clipped on the right
    draw(12'h120, 20, 29, 8);         // clipped at the bottom
    draw(12'h130, 63, 31, 15);
    draw(12'h130, 0, 0, 0);           // height 0 draws nothing
    // four-row draw timing
    @(negedge clk); saddr = 12'h140; sx = 6'd3; sy = 5'd9; sh = 4'd4; drw = 1;
    for (int r = 0; r < 4; r++) for (int b = 0; b < 8; b++)
      if (mem[12'h140 + r][7 - b]) screen[9 + r][3 + b] ^= 1'b1;
    run(cyc);
    $display("four-row draw took %0d cycles", cyc);
    check("four-row draw within 95 cycles", int'(cyc <= 95), 1);
    compare_screen("timed draw");
    // random draws with memory stalls
    stall_en = 1;
    for (int k = 0; k < 60; k++)
      draw($urandom_range(12'h200, 12'h3F0), $urandom_range(0, 63), $urandom_range(0, 31),
           $urandom_range(1, 15));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
