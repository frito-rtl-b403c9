// chip8_video_mux_tb: runs the video multiplexer behind the 720p signal
// generator, with a behavioural port-B memory (two-cycle latency) holding a
// random video buffer for each of 36 instances. For several grid settings it
// lets one frame pass (the layout is recomputed in vertical blanking) and then
// compares every pixel of the next frame with a reference computed directly
// by division: scale S = min(1280/(64*cols), 720/(32*rows)), even padding,
// instance = row*cols + col, dark background for inactive cells. It also
// checks that sync and blanking come out delayed by exactly two cycles.
module chip8_video_mux_tb;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [10:0] h; logic [9:0] v;
  logic hs, vs, ad, nf;
  logic [2:0] cols = 1, rows = 1;
  logic [5:0] act = 1;
  logic [15:0] maddr;
  logic [7:0]  mdata;
  logic [23:0] pix;
  logic pv, hs_o, vs_o, ad_o;

  video_sig_gen sg (.clk_pixel(clk), .rst(rst), .hcount(h), .vcount(v), .hor_sync(hs),
                    .vert_sync(vs), .active_draw(ad), .new_frame(nf));
  chip8_video_mux dut (
    .clk_pixel(clk), .rst(rst), .grid_cols(cols), .grid_rows(rows), .num_active(act),
    .hcount(h), .vcount(v), .hor_sync_in(hs), .vert_sync_in(vs), .active_draw_in(ad),
    .new_frame(nf), .hdmi_mem_addr(maddr), .hdmi_mem_data(mdata), .hdmi_pixel(pix),
    .pixel_value(pv), .hor_sync(hs_o), .vert_sync(vs_o), .active_draw(ad_o)
  );

  logic [7:0] vram [36][256];
  logic [7:0] d1, d2;
  always_ff @(posedge clk) begin
    d1 <= (maddr[13:8] < 36) ? vram[maddr[13:8]][maddr[7:0]] : 8'h00;
    d2 <= d1;
  end
  assign mdata = d2;

  int checks = 0, failures = 0;
  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0h expected %0h", what, got, exp); end
  endtask

  // reference: which cell / Chip-8 pixel lies at screen coordinate p on an axis
  function automatic int axis(input int p, input int pad, input int csize, input int n,
                              output int px);
    int t, j, off;
    px = 0;
    t = p - pad;
    if (t < 0) return -1;
    j = t / (csize + pad);
    off = t % (csize + pad);
    if (j >= n || off >= csize) return -1;
    px = off;
    return j;
  endfunction

  int hh [3], vv [3];
  logic hs_h [3], vs_h [3], ad_h [3];
  always @(posedge clk) begin
    hh[2] <= hh[1]; hh[1] <= hh[0]; hh[0] <= int'(h);
    vv[2] <= vv[1]; vv[1] <= vv[0]; vv[0] <= int'(v);
    hs_h[1] <= hs_h[0]; hs_h[0] <= hs;
    vs_h[1] <= vs_h[0]; vs_h[0] <= vs;
    ad_h[1] <= ad_h[0]; ad_h[0] <= ad;
  end

  task automatic run_config(input int c, input int r, input int a);
    int s, ph, pv_, bad, lit, bg, syncbad, jh, jv, xh, yv, inst, exp_pix;
    cols = 3'(c); rows = 3'(r); act = 6'(a);
    s = (1280 / (64 * c) < 720 / (32 * r)) ? 1280 / (64 * c) : 720 / (32 * r);
    ph = (1280 - 64 * c * s) / (c + 1);
    pv_ = (720 - 32 * r * s) / (r + 1);
    // let the current frame end and the layout be recomputed
    @(posedge nf); @(posedge clk);
    @(negedge clk); while (!(h == 0 && v == 0)) @(negedge clk);
    repeat (2) @(negedge clk);
    bad = 0; lit = 0; bg = 0; syncbad = 0;
    for (int k = 0; k < 1650 * 750; k++) begin
      if (hs_o !== hs_h[1] || vs_o !== vs_h[1] || ad_o !== ad_h[1]) syncbad++;
      if (ad_h[1]) begin
        jh = axis(hh[1], ph, 64 * s, c, xh);
        jv = axis(vv[1], pv_, 32 * s, r, yv);
        if (jh < 0 || jv < 0 || jv * c + jh >= a) begin
          exp_pix = 'h000040; bg++;
        end else begin
          inst = jv * c + jh;
          xh = xh / s; yv = yv / s;
          exp_pix = vram[inst][yv * 8 + xh / 8][7 - xh % 8] ? 'hFFFFFF : 'h202020;
          if (exp_pix == 'hFFFFFF) lit++;
        end
        if (int'(pix) != exp_pix) begin
          if (bad < 5) $display("pixel (%0d,%0d): got %0h expected %0h", hh[1], vv[1], pix, exp_pix);
          bad++;
        end
      end else if (pix != 0) bad++;
      @(negedge clk);
    end
    check($sformatf("grid %0dx%0d (%0d active) pixel mismatches", c, r, a), bad, 0);
    check("sync delayed by two cycles", syncbad, 0);
    check("some pixels lit", int'(lit > 0), 1);
    $display("grid %0dx%0d: scale %0d pad %0d/%0d, %0d lit, %0d background", c, r, s, ph, pv_, lit, bg);
  endtask

  initial begin
    for (int i = 0; i < 36; i++) for (int b = 0; b < 256; b++) vram[i][b] = 8'($urandom);
    repeat (3) @(negedge clk); rst = 0;
    run_config(6, 6, 36);
    run_config(3, 2, 5);
    run_config(1, 1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (12_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
