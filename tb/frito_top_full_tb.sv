// frito_top_full_tb: the emulator at its full size and speed (every parameter
// at its default: 36 instances, 500 Hz instruction tick, 60 Hz timers, 720p
// video, settings at the menu's reset values) in a 6x6 grid with all 36
// instances active. Every instance runs the
// demo program from reset until it waits in the program's delay loop; then
// one whole video frame is captured and each pixel compared with a reference
// built from the video buffers of the 36 memory cores (scale 3, padding 18
// across and 20 down). Also checks that every instance executed the same
// number of instructions, that drawing and the timer happened, and that the
// random digits made the instances' pictures differ, and that the longest
// round over all 36 instances fits in one 500 Hz tick.
module frito_top_full_tb;
  import chip8_pkg::*;
  localparam int NI = 36;

  logic clk = 0, clk_pixel = 0, clk_audio = 0, btn_rst = 1;
  always #5     clk = ~clk;
  always #6.734 clk_pixel = ~clk_pixel;
  always #5.086 clk_audio = ~clk_audio;

  logic [3:0]  cols;
  logic [6:0]  seg; logic [7:0] an;
  logic [23:0] pix; logic ad, hs, vs, aout;

  frito_top dut (
    .clk_100mhz(clk), .clk_pixel(clk_pixel), .clk_audio(clk_audio), .btn_rst(btn_rst),
    .pmoda(4'hF), .pmodb(cols), .btn_up(1'b0), .btn_down(1'b0),
    .btn_inc(1'b0), .btn_dec(1'b0), .sw_menu(1'b0), .dbg_core(6'd0), .dbg_addr(12'h200),
    .dbg_type(MEM_RAM), .seg(seg), .an(an), .hdmi_pixel(pix), .active_draw(ad),
    .hor_sync(hs), .vert_sync(vs), .audio_out(aout)
  );

  logic [7:0]  vram [NI][256];
  logic [11:0] pcs [NI];
  logic        snap = 0;
  int          steps [NI];
  for (genvar g = 0; g < NI; g++) begin : g_peek
    always @(posedge clk)
      pcs[g] <= {dut.u_mem.g_core[g].u_core.mem[RAM_BYTES + ST_PC][3:0],
                 dut.u_mem.g_core[g].u_core.mem[RAM_BYTES + ST_PC + 1]};
    always @(posedge clk) if (snap)
      for (int k = 0; k < 256; k++) vram[g][k] <= dut.u_mem.g_core[g].u_core.mem[RAM_BYTES + k];
  end

  int instrs = 0, drw = 0, cls = 0, tmr = 0;
  always @(posedge clk) if (!btn_rst && !dut.rst) begin
    if (dut.instr_done) instrs++;
    if (dut.video_draw_sprite) drw++;
    if (dut.video_clear_buffer) cls++;
    if (dut.timer_tick) tmr++;
  end
  // length of a round over all 36 instances, against the tick period
  int rcyc = 0, max_round = 0;
  always @(posedge clk) if (!btn_rst && !dut.rst) begin
    if (dut.proc_busy) rcyc <= rcyc + 1;
    if (dut.round_done) begin
      if (rcyc > max_round) max_round <= rcyc;
      rcyc <= 0;
    end
  end

  int checks = 0, failures = 0;
  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  function automatic bit all_waiting();
    for (int i = 0; i < NI; i++) if (pcs[i] < 12'h230 || pcs[i] > 12'h234) return 0;
    return 1;
  endfunction

  function automatic int axis(input int p, input int pad, input int csize, input int n,
                              output int px);
    int t;
    px = 0;
    t = p - pad;
    if (t < 0 || t / (csize + pad) >= n || t % (csize + pad) >= csize) return -1;
    px = t % (csize + pad);
    return t / (csize + pad);
  endfunction

  function automatic logic [23:0] expected(input int x, input int y);
    int c, r, px, py;
    c = axis(x, 18, 192, 6, px);
    r = axis(y, 20, 96, 6, py);
    if (c < 0 || r < 0) return 24'h000040;
    px /= 3; py /= 3;
    return vram[r * 6 + c][py * 8 + px / 8][7 - px % 8] ? 24'hFFFFFF : 24'h202020;
  endfunction

  initial begin
    int x, y, bad, lit, differ, drw0;
    logic ad_prev;
    repeat (10) @(negedge clk); btn_rst = 0;
    while (!all_waiting()) @(negedge clk);
    $display("all 36 instances in the delay loop after %0d instructions", instrs);
    @(posedge vs); @(negedge vs);
    snap = 1; @(posedge clk); #1 snap = 0;
    drw0 = drw + cls;
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
    check("no drawing during the frame", drw + cls - drw0, 0);
    check("lit pixels", int'(lit > 0), 1);
    check("instructions a multiple of 36", instrs % 36, 0);
    check("sprites drawn by every instance", int'(drw >= 36 * 5), 1);
    check("screen cleared by every instance", int'(cls >= 36), 1);
    check("timer ticks", int'(tmr > 0), 1);
    $display("longest round over 36 instances: %0d cycles (tick period 200000)", max_round);
    check("a round fits in one 500 Hz tick", int'(max_round > 0 && max_round < 200000), 1);
    differ = 0;
    for (int i = 1; i < NI; i++) for (int k = 0; k < 256; k++) if (vram[i][k] != vram[0][k]) differ++;
    check("instances differ (random digits)", int'(differ > 0), 1);
    $display("instructions %0d, sprites %0d, lit pixels %0d", instrs, drw, lit);
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
