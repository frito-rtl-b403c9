// video_sig_gen_tb: runs the signal generator at the full 720p timing for two
// frames and counts, per frame, active pixels (1280*720), hsync pulses and
// their length (40), vsync lines (5 lines of 1650 clocks), new_frame pulses
// (one, at hcount 1280 / vcount 720), and checks the line length (1650) and
// frame length (750 lines).
module video_sig_gen_tb;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [10:0] h; logic [9:0] v;
  logic hs, vs, ad, nf;

  video_sig_gen dut (.clk_pixel(clk), .rst(rst), .hcount(h), .vcount(v), .hor_sync(hs),
                     .vert_sync(vs), .active_draw(ad), .new_frame(nf));

  int checks = 0, failures = 0;
  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    int active, hs_cycles, hs_rises, vs_cycles, nfs, maxh, maxv;
    logic hs_prev;
    repeat (3) @(negedge clk); rst = 0;
    for (int f = 0; f < 2; f++) begin
      active = 0; hs_cycles = 0; hs_rises = 0; vs_cycles = 0; nfs = 0; maxh = 0; maxv = 0;
      hs_prev = 0;
      for (int k = 0; k < 1650 * 750; k++) begin
        @(negedge clk);
        if (ad) active++;
        if (hs) hs_cycles++;
        if (hs && !hs_prev) hs_rises++;
        hs_prev = hs;
        if (vs) vs_cycles++;
        if (nf) begin
          nfs++;
          check("new_frame position", int'(h) * 1000 + int'(v), 1280 * 1000 + 720);
        end
        if (int'(h) > maxh) maxh = int'(h);
        if (int'(v) > maxv) maxv = int'(v);
        if (int'(h) == 1100 && int'(v) == 100) check("sync low before front porch end", int'(hs), 0);
      end
      check("active pixels", active, 1280 * 720);
      check("hsync pulses", hs_rises, 750);
      check("hsync cycles", hs_cycles, 40 * 750);
      check("vsync cycles", vs_cycles, 5 * 1650);
      check("new_frame pulses", nfs, 1);
      check("max hcount", maxh, 1649);
      check("max vcount", maxv, 749);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
