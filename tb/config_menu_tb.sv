// config_menu_tb: checks the settings screen. It checks the reset values of
// every setting, saturation and cursor movement through the buttons, the
// ignored presses while disabled, the text the updater writes for labels, hex
// values and timbre names, the length of a full redraw, and the rendered
// pixels of the cursor glyph with their 3-cycle latency.
module config_menu_tb;
  import chip8_pkg::*;

  localparam int unsigned CLK_HZ = 100_000_000;

  logic clk = 0, clk_pixel = 0, rst = 1;
  always #5 clk = ~clk;
  always #7 clk_pixel = ~clk_pixel;

  logic en = 1, up = 0, down = 0, inc = 0, dec = 0;
  logic [19:0] tick_period;
  logic [5:0]  num_active, audio_inst;
  logic [2:0]  gcols, grows;
  quirks_t     quirks;
  logic [1:0]  timbre;
  logic [3:0]  tone, volume;
  logic        busy;
  logic [10:0] hc = 0;
  logic [9:0]  vc = 0;
  logic        act = 0, hs = 0, vs = 0;
  logic [23:0] pix;
  logic        m_act, m_hs, m_vs;

  config_menu #(.CLK_HZ(CLK_HZ)) dut (
    .clk(clk), .rst(rst), .enable(en), .btn_up(up), .btn_down(down),
    .btn_inc(inc), .btn_dec(dec), .tick_period(tick_period),
    .num_active(num_active), .grid_cols(gcols), .grid_rows(grows),
    .quirks(quirks), .timbre(timbre), .tone(tone), .volume(volume),
    .audio_inst(audio_inst), .redraw_busy(busy), .clk_pixel(clk_pixel),
    .hcount(hc), .vcount(vc), .active_in(act), .hs_in(hs), .vs_in(vs),
    .menu_pixel(pix), .menu_active(m_act), .menu_hs(m_hs), .menu_vs(m_vs));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic press(ref logic b);
    @(negedge clk) b = 1;
    repeat (3) @(negedge clk);
    b = 0;
    repeat (2) @(negedge clk);
  endtask

  task automatic wait_redraw(output int cycles);
    cycles = 0;
    while (busy) begin @(posedge clk); cycles++; end
  endtask

  function automatic string text_at(input int row, input int col, input int n);
    string s = "";
    for (int i = 0; i < n; i++) s = {s, string'(dut.scr[row*40 + col + i])};
    return s;
  endfunction

  function automatic bit cursor_on(input int item);
    return dut.scr[(item+1)*40 + 1] == 8'h3E;
  endfunction

  task automatic goto(input int item);
    for (int i = 0; i < 12; i++) press(up);
    for (int i = 0; i < item; i++) press(down);
  endtask

  int cyc;
  initial begin
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 0;
    // reset values
    check(tick_period == 20'(CLK_HZ / 500), "default 500 Hz");
    check(num_active == 36 && gcols == 6 && grows == 6, "default grid");
    check(timbre == 0 && tone == 5 && volume == 15 && audio_inst == 0, "default audio");
    check(quirks == '0, "default quirks");
    wait_redraw(cyc);
    $display("redraw took %0d cycles", cyc);
    check(cyc >= 920 && cyc <= 930, "full redraw is one cell per cycle");
    check(text_at(1, 3, 8) == "SPEED   ", "label SPEED");
    check(text_at(2, 3, 8) == "ACTIVE  ", "label ACTIVE");
    check(text_at(12, 3, 8) == "SOUND   ", "label SOUND");
    check(text_at(1, 12, 2) == "4 ", "speed value");
    check(text_at(2, 12, 3) == "24 ", "active value in hex");
    check(text_at(9, 12, 8) == "SINE    ", "timbre name");
    check(text_at(11, 12, 1) == "F", "volume value");
    check(cursor_on(0) && !cursor_on(1), "cursor on first row");
    check(text_at(0, 0, 40) == {40{" "}}, "top row blank");
    // cursor movement
    press(down); wait_redraw(cyc);
    check(!cursor_on(0) && cursor_on(1), "cursor moved down");
    press(up); press(up); wait_redraw(cyc);
    check(cursor_on(0), "cursor saturates at top");
    // timbre
    goto(8);
    press(inc); wait_redraw(cyc);
    check(timbre == 1 && text_at(9, 12, 8) == "TRIANGLE", "timbre triangle");
    for (int i = 0; i < 4; i++) press(inc);
    wait_redraw(cyc);
    check(timbre == 3 && text_at(9, 12, 8) == "SAWTOOTH", "timbre saturates");
    // volume
    goto(10);
    press(inc);
    check(volume == 15, "volume saturates at F");
    press(dec); wait_redraw(cyc);
    check(volume == 14 && text_at(11, 12, 1) == "E", "volume decrement");
    // active instances
    goto(1);
    press(inc);
    check(num_active == 36, "active limited to 36");
    press(dec); wait_redraw(cyc);
    check(num_active == 35 && text_at(2, 12, 2) == "23", "active 35");
    // speed
    goto(0);
    press(inc);
    check(tick_period == 20'(CLK_HZ / 600), "speed 600 Hz");
    for (int i = 0; i < 20; i++) press(dec);
    check(tick_period == 20'(CLK_HZ / 100), "speed 100 Hz minimum");
    // grid
    goto(2);
    for (int i = 0; i < 10; i++) press(dec);
    check(gcols == 1, "columns at least 1");
    // quirks
    goto(4); press(inc); press(inc);
    goto(7); press(inc);
    check(quirks.vf_reset && !quirks.shift_vy && !quirks.mem_inc_i && quirks.jump_vx, "quirks");
    wait_redraw(cyc);
    check(text_at(5, 12, 1) == "1" && text_at(6, 12, 1) == "0", "quirk values shown");
    // sound instance
    goto(11); press(inc); press(inc); wait_redraw(cyc);
    check(audio_inst == 2 && text_at(12, 12, 2) == "02", "sound instance");
    // disabled buttons
    en = 0;
    press(dec);
    check(audio_inst == 2, "presses ignored while disabled");
    en = 1;
    // renderer: cursor '>' on row 12 (cell y 384..415), column 1 (x 32..63)
    wait_redraw(cyc);
    begin
      logic [23:0] exp_q [$];
      logic [2:0]  hs_q [$];
      int x, y, gx, gy;
      bit on;
      for (int n = 0; n < 400; n++) begin
        @(negedge clk_pixel);
        gx = n % 8; gy = (n / 8) % 8;
        x = 32 + gx * 4 + (n % 4); y = 384 + gy * 4 + (n % 3);
        if (n % 50 == 7) begin x = 32 * 20; end        // blank cell
        hc = 11'(x); vc = 10'(y);
        act = (n % 37) != 0; hs = n[2]; vs = n[4];
        // '>' rows 0..6: bits 6..2 = 01000,00100,00010,00001,00010,00100,01000
        on = 0;
        if (x < 64 && gy < 7) begin
          int dd;
          dd = (gy <= 3) ? gy : 6 - gy;
          on = (gx == 2 + dd);
        end
        exp_q.push_back(!act ? 24'h0 : on ? 24'hFFFFFF : 24'h000040);
        hs_q.push_back({act, hs, vs});
        if (exp_q.size() > 2) begin
          logic [23:0] e;
          logic [2:0]  s;
          e = exp_q.pop_front(); s = hs_q.pop_front();
          @(posedge clk_pixel); #1;
          check(pix == e, $sformatf("pixel %0d", n));
          check({m_act, m_hs, m_vs} == s, $sformatf("sync delay %0d", n));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
