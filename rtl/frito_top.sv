// frito_top: a Chip-8 emulator that runs up to NUM_INST (36) Chip-8 machines
// at once on one processor and shows them side by side on a 1280x720 screen.
//
// Structure (three clock domains):
//   clk_100mhz  chip8_tick_gen -> chip8_processor <-> chip8_video, both using
//               port A of chip8_memory (processor first, then video, then
//               chip8_debug); keypad_scanner feeds keys_pressed to the
//               processor. The processor visits instances 0..num_active-1 once
//               per tick, selecting each instance's memory core with core_sel.
//   clk_pixel   video_sig_gen -> chip8_video_mux, which reads the video
//               buffers through port B of chip8_memory and produces the pixel
//               stream (hdmi_pixel, active_draw, hor_sync, vert_sync) for an
//               external TMDS encoder/serializer, which is not part of this RTL.
//   clk_audio   chip8_audio plays a tone while the sound timer of instance
//               audio_inst is running; the pdm output drives the audio jack.
// Clocks come from outside (74.25 MHz pixel clock, about 98.3 MHz audio clock,
// made by the FPGA's clock managers). btn_rst is synchronized into each domain;
// settings crossing into the pixel and audio domains pass 2-flop synchronizers
// (they change only on a button press).
// Settings come from config_menu (clk_100mhz side): four buttons change them
// while sw_menu is high, and sw_menu switches the display between the
// instance grid and the settings screen. CLK_HZ and the DEF_* parameters set
// the system clock rate (for the instruction-rate table) and the settings
// after reset. The debug display's core, address and space are switch inputs.
// Games are compiled into the memory cores from ROM_FILE, or from ROM_FILE_ALT
// for the instances whose bit is set in ROM_ALT_MASK. The partition into
// processor, memory, video, multiplexer, input and audio modules and their
// connections follow the design description.
module frito_top
  import chip8_pkg::*;
#(
  parameter int unsigned NUM_INST     = 36,
  parameter string       ROM_FILE     = "rtl/chip8_demo_rom.hex",
  parameter string       ROM_FILE_ALT = "rtl/chip8_demo_rom.hex",
  parameter logic [63:0] ROM_ALT_MASK = 64'h0,
  parameter int unsigned TIMER_PERIOD = 1_666_667,
  parameter int unsigned DECIM        = 32768,
  parameter int unsigned DBG_REFRESH  = 1_000_000,
  parameter int unsigned CLK_HZ       = 100_000_000,
  parameter logic [3:0]  DEF_SPEED    = 4'd4,
  parameter logic [5:0]  DEF_ACTIVE   = 6'(NUM_INST),
  parameter logic [2:0]  DEF_COLS     = 3'd6,
  parameter logic [2:0]  DEF_ROWS     = 3'd6,
  parameter logic [1:0]  DEF_TIMBRE   = 2'd0,
  parameter logic [3:0]  DEF_TONE     = 4'd5,
  parameter logic [3:0]  DEF_VOLUME   = 4'd15,
  parameter int unsigned H_ACTIVE = 1280, parameter int unsigned H_FP = 110,
  parameter int unsigned H_SYNC   = 40,   parameter int unsigned H_BP = 220,
  parameter int unsigned V_ACTIVE = 720,  parameter int unsigned V_FP = 5,
  parameter int unsigned V_SYNC   = 5,    parameter int unsigned V_BP = 20
) (
  input  logic        clk_100mhz,
  input  logic        clk_pixel,
  input  logic        clk_audio,
  input  logic        btn_rst,
  // keypad
  input  logic [3:0]  pmoda,           // rows, pulled up
  output logic [3:0]  pmodb,           // columns
  // settings menu buttons (debounced levels) and display toggle
  input  logic        btn_up,
  input  logic        btn_down,
  input  logic        btn_inc,
  input  logic        btn_dec,
  input  logic        sw_menu,         // 1 = show the settings screen
  // debug display
  input  logic [5:0]  dbg_core,
  input  logic [11:0] dbg_addr,
  input  mem_type_t   dbg_type,
  output logic [6:0]  seg,
  output logic [7:0]  an,
  // video stream to the HDMI encoder
  output logic [23:0] hdmi_pixel,
  output logic        active_draw,
  output logic        hor_sync,
  output logic        vert_sync,
  // audio
  output logic        audio_out
);

  localparam int unsigned H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;

  // ---------------- resets ----------------
  logic rst, rst_pix, rst_aud;
  sync_2ff u_rst_sys (.clk(clk_100mhz), .d(btn_rst), .q(rst));
  sync_2ff u_rst_pix (.clk(clk_pixel),  .d(btn_rst), .q(rst_pix));
  sync_2ff u_rst_aud (.clk(clk_audio),  .d(btn_rst), .q(rst_aud));


  // ---------------- settings menu ----------------
  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic        hs_raw, vs_raw, ad_raw, new_frame;
  logic [19:0] tick_period;
  logic [5:0]  num_active, audio_inst;
  logic [2:0]  grid_cols, grid_rows;
  quirks_t     quirks;
  logic [1:0]  timbre;
  logic [3:0]  tone, volume;
  logic [3:0]  btn_s;
  logic        menu_s, menu_p, menu_busy;
  logic [23:0] menu_pixel, mux_pixel;
  logic        menu_ad, menu_hs, menu_vs, mux_ad, mux_hs, mux_vs;

  sync_2ff #(.WIDTH(5)) u_btn_sync (
    .clk(clk_100mhz), .d({btn_up, btn_down, btn_inc, btn_dec, sw_menu}), .q({btn_s, menu_s})
  );

  config_menu #(
    .CLK_HZ(CLK_HZ), .MAX_INST(NUM_INST), .DEF_SPEED(DEF_SPEED), .DEF_ACTIVE(DEF_ACTIVE),
    .DEF_COLS(DEF_COLS), .DEF_ROWS(DEF_ROWS), .DEF_TIMBRE(DEF_TIMBRE), .DEF_TONE(DEF_TONE),
    .DEF_VOLUME(DEF_VOLUME)
  ) u_menu (
    .clk(clk_100mhz), .rst(rst), .enable(menu_s), .btn_up(btn_s[3]), .btn_down(btn_s[2]),
    .btn_inc(btn_s[1]), .btn_dec(btn_s[0]), .tick_period(tick_period),
    .num_active(num_active), .grid_cols(grid_cols), .grid_rows(grid_rows), .quirks(quirks),
    .timbre(timbre), .tone(tone), .volume(volume), .audio_inst(audio_inst),
    .redraw_busy(menu_busy), .clk_pixel(clk_pixel), .hcount(hcount), .vcount(vcount),
    .active_in(ad_raw), .hs_in(hs_raw), .vs_in(vs_raw), .menu_pixel(menu_pixel),
    .menu_active(menu_ad), .menu_hs(menu_hs), .menu_vs(menu_vs)
  );

  logic [5:0] n_act;
  assign n_act = (num_active == 6'd0) ? 6'd1 :
                 (int'(num_active) > int'(NUM_INST)) ? 6'(NUM_INST) : num_active;

  // ---------------- system domain ----------------
  logic        tick, timer_tick;
  logic [15:0] keys_pressed;
  logic [5:0]  core_sel;
  mem_req_t    proc_req, video_req, debug_req;
  logic        proc_mem_ready, proc_mem_valid;
  logic        video_mem_ready, video_mem_valid;
  logic        debug_mem_ready, debug_mem_valid;
  logic [7:0]  mem_data;
  logic        video_clear_buffer, video_draw_sprite, video_collision, video_done_drawing;
  logic [11:0] video_sprite_addr;
  logic [5:0]  video_sprite_x;
  logic [4:0]  video_sprite_y;
  logic [3:0]  video_sprite_height;
  logic [NUM_INST-1:0] sound_active;
  logic        instr_done, round_done, proc_busy;
  logic [15:0] hdmi_mem_addr;
  logic [7:0]  hdmi_mem_data;
  logic [7:0]  dbg_shown;

  chip8_tick_gen #(.TIMER_PERIOD(TIMER_PERIOD)) u_tick (
    .clk(clk_100mhz), .rst(rst), .tick_period(tick_period), .tick(tick), .timer_tick(timer_tick)
  );

  keypad_scanner u_keypad (
    .clk(clk_100mhz), .rst(rst), .rows(pmoda), .cols(pmodb), .keys_pressed(keys_pressed)
  );

  chip8_processor #(.NUM_INST(NUM_INST)) u_proc (
    .clk(clk_100mhz), .rst(rst), .tick(tick), .timer_tick(timer_tick), .num_active(n_act),
    .quirks(quirks), .keys_pressed(keys_pressed), .core_sel(core_sel),
    .proc_req(proc_req), .proc_mem_ready(proc_mem_ready), .proc_mem_valid(proc_mem_valid),
    .mem_data(mem_data),
    .video_clear_buffer(video_clear_buffer), .video_draw_sprite(video_draw_sprite),
    .video_sprite_addr(video_sprite_addr), .video_sprite_x(video_sprite_x),
    .video_sprite_y(video_sprite_y), .video_sprite_height(video_sprite_height),
    .video_collision(video_collision), .video_done_drawing(video_done_drawing),
    .sound_active(sound_active), .instr_done(instr_done), .round_done(round_done),
    .busy(proc_busy)
  );

  chip8_video u_video (
    .clk(clk_100mhz), .rst(rst),
    .video_clear_buffer(video_clear_buffer), .video_draw_sprite(video_draw_sprite),
    .video_sprite_addr(video_sprite_addr), .video_sprite_x(video_sprite_x),
    .video_sprite_y(video_sprite_y), .video_sprite_height(video_sprite_height),
    .video_collision(video_collision), .video_done_drawing(video_done_drawing),
    .video_req(video_req), .video_mem_ready(video_mem_ready),
    .video_mem_valid(video_mem_valid), .mem_data(mem_data)
  );

  chip8_debug #(.REFRESH(DBG_REFRESH)) u_debug (
    .clk(clk_100mhz), .rst(rst), .dbg_addr(dbg_addr), .dbg_type(dbg_type),
    .debug_req(debug_req), .debug_mem_ready(debug_mem_ready),
    .debug_mem_valid(debug_mem_valid), .mem_data(mem_data), .shown_data(dbg_shown),
    .seg(seg), .an(an)
  );

  chip8_memory #(
    .NUM_INST(NUM_INST), .ROM_FILE(ROM_FILE), .ROM_FILE_ALT(ROM_FILE_ALT),
    .ROM_ALT_MASK(ROM_ALT_MASK)
  ) u_mem (
    .clk(clk_100mhz), .rst(rst), .core_sel(core_sel), .debug_core(dbg_core),
    .proc_req(proc_req), .proc_mem_ready(proc_mem_ready), .proc_mem_valid(proc_mem_valid),
    .video_req(video_req), .video_mem_ready(video_mem_ready), .video_mem_valid(video_mem_valid),
    .debug_req(debug_req), .debug_mem_ready(debug_mem_ready), .debug_mem_valid(debug_mem_valid),
    .mem_data(mem_data),
    .clk_pixel(clk_pixel), .hdmi_mem_addr(hdmi_mem_addr), .hdmi_mem_data(hdmi_mem_data)
  );

  // ---------------- pixel domain ----------------
  logic [2:0]  cols_p, rows_p;
  logic [5:0]  act_p;
  logic        pixel_value;

  sync_2ff #(.WIDTH(12)) u_grid_sync (
    .clk(clk_pixel), .d({grid_cols, grid_rows, n_act}), .q({cols_p, rows_p, act_p})
  );

  video_sig_gen #(
    .H_ACTIVE(H_ACTIVE), .H_FP(H_FP), .H_SYNC(H_SYNC), .H_BP(H_BP),
    .V_ACTIVE(V_ACTIVE), .V_FP(V_FP), .V_SYNC(V_SYNC), .V_BP(V_BP)
  ) u_vsg (
    .clk_pixel(clk_pixel), .rst(rst_pix), .hcount(hcount), .vcount(vcount),
    .hor_sync(hs_raw), .vert_sync(vs_raw), .active_draw(ad_raw), .new_frame(new_frame)
  );

  chip8_video_mux #(
    .H_ACTIVE(H_ACTIVE), .H_TOTAL(H_TOTAL), .V_ACTIVE(V_ACTIVE), .V_TOTAL(V_TOTAL)
  ) u_mux (
    .clk_pixel(clk_pixel), .rst(rst_pix), .grid_cols(cols_p), .grid_rows(rows_p),
    .num_active(act_p), .hcount(hcount), .vcount(vcount), .hor_sync_in(hs_raw),
    .vert_sync_in(vs_raw), .active_draw_in(ad_raw), .new_frame(new_frame),
    .hdmi_mem_addr(hdmi_mem_addr), .hdmi_mem_data(hdmi_mem_data),
    .hdmi_pixel(mux_pixel), .pixel_value(pixel_value),
    .hor_sync(mux_hs), .vert_sync(mux_vs), .active_draw(mux_ad)
  );

  // the display shows either the instance grid or the settings screen
  sync_2ff #(.WIDTH(1)) u_menu_sync (.clk(clk_pixel), .d(sw_menu), .q(menu_p));
  assign hdmi_pixel  = menu_p ? menu_pixel : mux_pixel;
  assign hor_sync    = menu_p ? menu_hs    : mux_hs;
  assign vert_sync   = menu_p ? menu_vs    : mux_vs;
  assign active_draw = menu_p ? menu_ad    : mux_ad;

  // ---------------- audio domain ----------------
  logic       active_in;
  logic [9:0] aud_set;
  logic [7:0] amp, level;

  sync_2ff #(.WIDTH(1)) u_act_sync (
    .clk(clk_audio),
    .d((int'(audio_inst) < int'(NUM_INST)) ? sound_active[audio_inst] : 1'b0),
    .q(active_in)
  );
  sync_2ff #(.WIDTH(10)) u_aud_sync (.clk(clk_audio), .d({timbre, tone, volume}), .q(aud_set));

  chip8_audio #(.DECIM(DECIM)) u_audio (
    .clk_audio(clk_audio), .rst(rst_aud), .timbre(aud_set[9:8]), .tone(aud_set[7:4]),
    .volume(aud_set[3:0]), .active_in(active_in), .amp_out(amp), .level(level),
    .audio_out(audio_out)
  );

endmodule
