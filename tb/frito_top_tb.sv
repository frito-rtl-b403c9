// frito_top_tb: end-to-end run of the emulator with four instances, all
// running the demo program, shortened timers (instruction tick every 600
// cycles, 60 Hz timer every 100000 cycles, audio sample every 64 audio clocks)
// and the full 720p video timing, shown in a 2x2 grid. Three clocks run at
// 100, 74.25 and 98.3 MHz. A model of the key matrix with pull-up rows sits on
// pmoda/pmodb.
// The test counts each mechanism of the design and fails if one never
// happens: rounds over all instances, instructions, CLS, DRW, sprite
// collisions, clipped sprites, timer decrements, sound-timer audio output,
// a key press taking the EX9E branch, the debug reader waiting behind higher
// priority requesters, and random numbers differing between instances.
// While every instance waits in the program's delay loop (video buffers not
// changing), it captures one whole frame and compares each pixel with the
// video buffers read out of the memory cores. Instance 3 is built with a
// second program (tb/frito_alt_rom.hex), which draws the letter A and stops,
// so two different programs share the grid. Finally it switches to the
// settings screen, changes the volume with the buttons and checks that the
// screen shows text and no longer the grid.
module frito_top_tb;
  import chip8_pkg::*;
  localparam int NI = 4;
  localparam int ALT = 3;             // instance running the second program

  logic clk = 0, clk_pixel = 0, clk_audio = 0, btn_rst = 1;
  always #5     clk = ~clk;
  always #6.734 clk_pixel = ~clk_pixel;
  always #5.086 clk_audio = ~clk_audio;

  logic [3:0]  rows, cols;
  logic [15:0] held = '0;             // keys held down, bit 4*row + col
  logic [6:0]  seg; logic [7:0] an;
  logic [23:0] pix; logic ad, hs, vs, aout;

  logic up = 0, down = 0, inc = 0, dec = 0, menu = 0;

  // CLK_HZ = 300000 makes the default rate (500 per second) one tick every
  // 600 cycles
  frito_top #(.NUM_INST(NI), .TIMER_PERIOD(100000), .DECIM(64), .DBG_REFRESH(300),
              .CLK_HZ(300000), .DEF_ACTIVE(6'(NI)), .DEF_COLS(3'd2), .DEF_ROWS(3'd2),
              .DEF_TIMBRE(2'd2), .DEF_TONE(4'd7), .DEF_VOLUME(4'd12),
              .ROM_FILE_ALT("tb/frito_alt_rom.hex"), .ROM_ALT_MASK(64'(1 << ALT))) dut (
    .clk_100mhz(clk), .clk_pixel(clk_pixel), .clk_audio(clk_audio), .btn_rst(btn_rst),
    .pmoda(rows), .pmodb(cols), .btn_up(up), .btn_down(down), .btn_inc(inc),
    .btn_dec(dec), .sw_menu(menu), .dbg_core(6'd1), .dbg_addr(ST_PC),
    .dbg_type(MEM_STATE), .seg(seg), .an(an), .hdmi_pixel(pix), .active_draw(ad),
    .hor_sync(hs), .vert_sync(vs), .audio_out(aout)
  );

  always_comb
    for (int r = 0; r < 4; r++) begin
      rows[r] = 1'b1;
      for (int c = 0; c < 4; c++) if (held[4*r + c] && !cols[c]) rows[r] = 1'b0;
    end

  // ---------------- peeking into the memory cores ----------------
  logic [7:0] vram [NI][256];
  logic [11:0] pcs [NI];
  logic [7:0] dts [NI];
  for (genvar g = 0; g < NI; g++) begin : g_peek
    always @(posedge clk) begin
      pcs[g] <= {dut.u_mem.g_core[g].u_core.mem[RAM_BYTES + ST_PC][3:0],
                 dut.u_mem.g_core[g].u_core.mem[RAM_BYTES + ST_PC + 1]};
      dts[g] <= dut.u_mem.g_core[g].u_core.mem[RAM_BYTES + ST_DT];
    end
    always @(posedge clk) if (snap)
      for (int k = 0; k < 256; k++) vram[g][k] <= dut.u_mem.g_core[g].u_core.mem[RAM_BYTES + k];
  end
  logic snap = 0;

  task automatic press(ref logic b);
    @(negedge clk) b = 1;
    repeat (10) @(negedge clk);
    b = 0;
    repeat (10) @(negedge clk);
  endtask

  // ---------------- mechanism counters ----------------
  int rounds = 0, instrs = 0, cls = 0, drw = 0, colls = 0, clipped = 0, dt_dec = 0;
  int pdm_ones = 0, dbg_waits = 0, key_skips = 0, sound_on = 0;
  always @(posedge clk) if (!btn_rst && !dut.rst) begin
    if (dut.round_done) rounds++;
    if (dut.instr_done) instrs++;
    if (dut.video_clear_buffer) cls++;
    if (dut.video_draw_sprite) begin
      drw++;
      if (int'(dut.video_sprite_x) + 8 > 64 || int'(dut.video_sprite_y) + int'(dut.video_sprite_height) > 32)
        clipped++;
    end
    if (dut.video_done_drawing && dut.video_collision) colls++;
    if (dut.debug_req.valid_req && !dut.debug_mem_ready) dbg_waits++;
    if (dut.sound_active[0]) sound_on++;
    // the PC write that completes EX9E at 0x226 with the key down goes to 0x22A
    if (dut.proc_req.valid_req && dut.proc_mem_ready && dut.proc_req.we &&
        dut.proc_req.addr == ST_PC + 12'd1 && dut.proc_req.data == 8'h2A) key_skips++;
  end
  // instruction lengths, from the end of one instruction (or the start of a
  // round) to the end of the next
  int icyc = 0, max_instr = 0, max_cls = 0, max_drw = 0;
  bit saw_cls = 0, saw_drw = 0;
  always @(posedge clk) if (!btn_rst && !dut.rst) begin
    if (!dut.proc_busy) icyc <= 0;
    else icyc <= icyc + 1;
    if (dut.video_clear_buffer) saw_cls <= 1;
    if (dut.video_draw_sprite)  saw_drw <= 1;
    if (dut.instr_done) begin
      if (icyc > max_instr) max_instr <= icyc;
      if (saw_cls && icyc > max_cls) max_cls <= icyc;
      if (saw_drw && icyc > max_drw) max_drw <= icyc;
      icyc <= 1; saw_cls <= 0; saw_drw <= 0;
    end
  end
  logic [7:0] dt_prev [NI];
  always @(posedge clk) if (!btn_rst && !dut.rst) for (int i = 0; i < NI; i++) begin
    if (dts[i] == dt_prev[i] - 8'd1) dt_dec++;
    dt_prev[i] <= dts[i];
  end
  always @(posedge clk_audio) if (!btn_rst && !dut.rst_aud) pdm_ones += int'(aout);

  int checks = 0, failures = 0;
  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask
  task automatic happened(input string what, input int n);
    checks++;
    $display("%-34s %0d", what, n);
    if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
  endtask

  function automatic bit all_waiting();
    for (int i = 0; i < NI; i++)
      if (i == ALT) begin
        if (pcs[i] != 12'h206) return 0;
      end else if (pcs[i] < 12'h230 || pcs[i] > 12'h234 || dts[i] < 8'd30) return 0;
    return 1;
  endfunction

  // reference picture for a 2x2 grid: scale 10, padding 0 across, 26 down
  function automatic logic [23:0] expected(input int x, input int y);
    int c, r, px, py, t;
    if (x >= 1280) return 24'h0;
    t = y - 26;
    if (t < 0) return 24'h000040;
    r = t / (320 + 26);
    if (t % 346 >= 320 || r >= 2) return 24'h000040;
    c = x / 640;
    px = (x % 640) / 10;
    py = (t % 346) / 10;
    return vram[r * 2 + c][py * 8 + px / 8][7 - px % 8] ? 24'hFFFFFF : 24'h202020;
  endfunction

  task automatic capture_frame();
    int x, y, bad, lit, cls0, drw0;
    logic vs_prev, ad_prev;
    do begin @(posedge vs); @(negedge vs); end while (!all_waiting());
    snap = 1; @(posedge clk); #1 snap = 0;
    cls0 = cls; drw0 = drw;
    x = 0; y = 0; bad = 0; lit = 0; ad_prev = 0;
    while (y < 720) begin
      @(posedge clk_pixel); #0.1;
      if (ad) begin
        if (pix !== expected(x, y)) begin
          if (bad < 5) $display("pixel (%0d,%0d) got %h expected %h", x, y, pix, expected(x, y));
          bad++;
        end
        if (pix == 24'hFFFFFF) lit++;
        x++;
      end else if (ad_prev) begin
        x = 0; y++;
      end
      ad_prev = ad;
    end
    check("frame pixels matching the video buffers", 1280 * 720 - bad, 1280 * 720);
    check("no drawing during the captured frame", (cls - cls0) + (drw - drw0), 0);
    happened("lit pixels in the frame", lit);
  endtask

  initial begin
    int t0;
    repeat (10) @(negedge clk); btn_rst = 0;
    // let the programs run into the delay loop
    t0 = 0;
    while (!all_waiting() && t0 < 2_000_000) begin @(negedge clk); t0++; end
    check("all instances reached the delay loop", int'(all_waiting()), 1);
    capture_frame();
    // random digits: the instances' pictures should not all be equal
    begin
      int differ = 0;
      for (int i = 1; i < NI; i++) for (int k = 0; k < 256; k++) if (vram[i][k] != vram[0][k]) differ++;
      happened("video bytes differing between instances", differ);
      // the second program shows the letter A (font rows F0 90 F0 90 90)
      check("second program on instance 3", int'({vram[ALT][0], vram[ALT][8], vram[ALT][16],
            vram[ALT][24], vram[ALT][32], vram[ALT][40]} == 48'hF090F0909000), 1);
    end
    // press key 0 (row 3, column 1 on the pad is wired as bit 0 here: row 0, column 0)
    held = 16'h0001;
    t0 = 0;
    while (key_skips == 0 && t0 < 3_000_000) begin @(negedge clk); t0++; end
    repeat (20000) @(negedge clk);
    held = '0;
    happened("rounds over all instances", rounds);
    check("instructions = rounds x instances", int'(instrs >= rounds * NI && instrs <= rounds * NI + NI), 1);
    happened("CLS", cls);
    happened("DRW", drw);
    happened("sprite collisions", colls);
    happened("clipped sprites", clipped);
    happened("timer decrements", dt_dec);
    happened("cycles with instance 0 sound on", sound_on);
    happened("PDM ones on the audio output", pdm_ones);
    happened("debug reads waiting behind others", dbg_waits);
    happened("key-press branches (EX9E)", key_skips);
    happened("debug display shows instance 1 PC", int'(dut.u_debug.shown_data != 0));
    $display("longest instruction %0d cycles, CLS %0d, DRW (5-row digit) %0d", max_instr, max_cls, max_drw);
    check("longest instruction within 5555 cycles", int'(max_instr > 0 && max_instr <= 5555), 1);
    // settings screen: buttons do nothing while it is hidden, then show it,
    // lower the volume and look at the upper part of one frame
    check("tick period from the menu", int'(dut.tick_period), 600);
    press(dec);
    check("buttons ignored while the grid is shown", int'(dut.volume), 12);
    menu = 1;
    repeat (10) press(down);
    press(dec);
    check("volume lowered from the menu", int'(dut.volume), 11);
    repeat (5000) @(negedge clk);
    check("volume reaches the audio domain", int'(dut.aud_set[3:0]), 11);
    begin
      int text = 0, grid_px = 0;
      @(posedge vs); @(negedge vs);
      for (int n = 0; n < 1650 * 430; n++) begin
        @(posedge clk_pixel);
        if (ad && pix == 24'hFFFFFF) text++;
        if (ad && pix == 24'h202020) grid_px++;
      end
      happened("settings text pixels on screen", text);
      check("grid hidden behind the settings screen", grid_px, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
