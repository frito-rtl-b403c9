// config_menu: the settings screen. It holds the user-adjustable settings
// (instruction rate, number of instances, grid size, the four compatibility
// quirks, audio timbre/tone/volume and which instance is heard), lets buttons
// change them, and draws them as monospaced text on the 1280x720 screen.
//
// Memories (both dual-ported, one port per clock domain):
//   sym  SYM_BYTES = 2176 bytes: an 8x8 glyph for each of 256 character codes
//        (codes are ASCII; digits, capitals, space and '>' are drawn) followed
//        by 128 bytes of item names: 12 row labels and 4 timbre names, 8
//        characters each. Port A (clk) fetches names for the screen updater,
//        port B (clk_pixel) fetches glyph rows for the renderer.
//   scr  40 x 23 = 920 bytes of screen text, one character per 32x32 pixel
//        cell (glyphs are scaled by 4). Port A (clk) receives the updater's
//        writes, port B (clk_pixel) is read by the renderer.
// Screen: item i (0..11) is on text row i+1. Column 1 holds the cursor '>'
// on the selected row, columns 3..10 the label, columns 12.. the value as
// hex digits (two for ACTIVE and SOUND) or, for TIMBRE, its name.
// Items: 0 SPEED s (instruction rate 100*(s+1) Hz, 4 = 500 Hz), 1 ACTIVE
// instances (1..MAX_INST), 2 COLUMNS and 3 ROWS of the grid (1..6), 4..7 the
// quirks VF RESET, SHIFT VY, INC I, JUMP VX (0/1), 8 TIMBRE (sine, triangle,
// square, sawtooth), 9 TONE (0..F), 10 VOLUME (0..F), 11 SOUND = instance
// whose sound timer is heard (0..MAX_INST-1). Values saturate at their limits.
// Buttons (clk domain, debounced levels): btn_up/btn_down move the cursor,
// btn_inc/btn_dec change the selected value, on the press edge, and only
// while enable is high. After reset and after every change the updater
// rewrites the whole text buffer (one cell per cycle, 921 cycles).
// Renderer (hcount[1:0] and vcount[1:0] are unused: glyph pixels are 4x4
// screen pixels): menu_pixel and the syncs come out 3 pixel clocks after hcount,
// vcount and the input syncs. Text is COLOR_TEXT on COLOR_BG.
// The two memories, their purposes and port assignment and the hex-digit
// values follow the design description; the item list, layout, glyphs,
// buttons and rate encoding are this design's own.
module config_menu
  import chip8_pkg::*;
#(
  parameter int unsigned CLK_HZ     = 100_000_000,
  parameter int unsigned MAX_INST   = 36,
  parameter logic [3:0]  DEF_SPEED  = 4'd4,
  parameter logic [5:0]  DEF_ACTIVE = 6'd36,
  parameter logic [2:0]  DEF_COLS   = 3'd6,
  parameter logic [2:0]  DEF_ROWS   = 3'd6,
  parameter logic [1:0]  DEF_TIMBRE = 2'd0,
  parameter logic [3:0]  DEF_TONE   = 4'd5,
  parameter logic [3:0]  DEF_VOLUME = 4'd15,
  parameter logic [23:0] COLOR_TEXT = 24'hFFFFFF,
  parameter logic [23:0] COLOR_BG   = 24'h000040
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        enable,
  input  logic        btn_up,
  input  logic        btn_down,
  input  logic        btn_inc,
  input  logic        btn_dec,
  // settings
  output logic [19:0] tick_period,
  output logic [5:0]  num_active,
  output logic [2:0]  grid_cols,
  output logic [2:0]  grid_rows,
  output quirks_t     quirks,
  output logic [1:0]  timbre,
  output logic [3:0]  tone,
  output logic [3:0]  volume,
  output logic [5:0]  audio_inst,
  output logic        redraw_busy,
  // renderer
  input  logic        clk_pixel,
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  input  logic        active_in,
  input  logic        hs_in,
  input  logic        vs_in,
  output logic [23:0] menu_pixel,
  output logic        menu_active,
  output logic        menu_hs,
  output logic        menu_vs
);

  localparam int unsigned N_ITEMS   = 12;
  localparam int unsigned TXT_COLS  = 40;
  localparam int unsigned TXT_ROWS  = 23;
  localparam int unsigned SCR_BYTES = TXT_COLS * TXT_ROWS;
  localparam int unsigned NAME_BASE = 256 * 8;
  localparam int unsigned SYM_BYTES = NAME_BASE + 128;
  localparam int unsigned TIMBRE_NAMES = NAME_BASE + 8 * N_ITEMS;

  // ---------------- glyphs and names ----------------
  function automatic logic [63:0] glyph(input logic [7:0] code);
    case (code)
      8'h30: return 64'h38444C5464443800;  // '0'
      8'h31: return 64'h1030101010103800;  // '1'
      8'h32: return 64'h3844040810207C00;  // '2'
      8'h33: return 64'h7804043804047800;  // '3'
      8'h34: return 64'h081828487C080800;  // '4'
      8'h35: return 64'h7C40780404443800;  // '5'
      8'h36: return 64'h1820407844443800;  // '6'
      8'h37: return 64'h7C04081020202000;  // '7'
      8'h38: return 64'h3844443844443800;  // '8'
      8'h39: return 64'h3844443C04083000;  // '9'
      8'h41: return 64'h3844447C44444400;  // 'A'
      8'h42: return 64'h7844447844447800;  // 'B'
      8'h43: return 64'h3844404040443800;  // 'C'
      8'h44: return 64'h7048444444487000;  // 'D'
      8'h45: return 64'h7C40407840407C00;  // 'E'
      8'h46: return 64'h7C40407840404000;  // 'F'
      8'h47: return 64'h3844405C44443C00;  // 'G'
      8'h48: return 64'h4444447C44444400;  // 'H'
      8'h49: return 64'h3810101010103800;  // 'I'
      8'h4A: return 64'h1C08080808483000;  // 'J'
      8'h4B: return 64'h4448506050484400;  // 'K'
      8'h4C: return 64'h4040404040407C00;  // 'L'
      8'h4D: return 64'h446C545444444400;  // 'M'
      8'h4E: return 64'h444464544C444400;  // 'N'
      8'h4F: return 64'h3844444444443800;  // 'O'
      8'h50: return 64'h7844447840404000;  // 'P'
      8'h51: return 64'h3844444454483400;  // 'Q'
      8'h52: return 64'h7844447850484400;  // 'R'
      8'h53: return 64'h3C40403804047800;  // 'S'
      8'h54: return 64'h7C10101010101000;  // 'T'
      8'h55: return 64'h4444444444443800;  // 'U'
      8'h56: return 64'h4444444444281000;  // 'V'
      8'h57: return 64'h4444445454542800;  // 'W'
      8'h58: return 64'h4444281028444400;  // 'X'
      8'h59: return 64'h4444442810101000;  // 'Y'
      8'h5A: return 64'h7C04081020407C00;  // 'Z'
      8'h3E: return 64'h2010080408102000;  // '>'
      default: return 64'h0;
    endcase
  endfunction

  localparam string NAMES = {"SPEED   ", "ACTIVE  ", "COLUMNS ", "ROWS    ",
                             "VF RESET", "SHIFT VY", "INC I   ", "JUMP VX ",
                             "TIMBRE  ", "TONE    ", "VOLUME  ", "SOUND   ",
                             "SINE    ", "TRIANGLE", "SQUARE  ", "SAWTOOTH"};

  logic [7:0] sym [SYM_BYTES];
  logic [7:0] scr [SCR_BYTES];

  initial begin
    for (int c = 0; c < 256; c++)
      for (int r = 0; r < 8; r++)
        sym[c*8 + r] = glyph(8'(c))[63 - 8*r -: 8];
    for (int i = 0; i < 128; i++)
      sym[NAME_BASE + i] = NAMES[i];
    for (int i = 0; i < int'(SCR_BYTES); i++)
      scr[i] = 8'h20;
  end

  // ---------------- settings ----------------
  logic [3:0] sel;
  logic [3:0] speed;
  logic       up_q, down_q, inc_q, dec_q;
  logic       up_e, down_e, inc_e, dec_e;
  logic       dirty;

  always_ff @(posedge clk) begin
    up_q <= btn_up; down_q <= btn_down; inc_q <= btn_inc; dec_q <= btn_dec;
  end
  assign up_e   = enable && btn_up   && !up_q;
  assign down_e = enable && btn_down && !down_q;
  assign inc_e  = enable && btn_inc  && !inc_q;
  assign dec_e  = enable && btn_dec  && !dec_q;

  // maximum of each item, for saturation
  function automatic logic [5:0] item_max(input logic [3:0] i);
    case (i)
      4'd0, 4'd9, 4'd10:    return 6'd15;
      4'd1:                 return 6'(MAX_INST);
      4'd2, 4'd3:           return 6'd6;
      4'd4, 4'd5, 4'd6, 4'd7: return 6'd1;
      4'd8:                 return 6'd3;
      default:              return 6'(MAX_INST - 1);
    endcase
  endfunction
  function automatic logic [5:0] item_min(input logic [3:0] i);
    return (i == 4'd1 || i == 4'd2 || i == 4'd3) ? 6'd1 : 6'd0;
  endfunction

  logic [5:0] cur, nxt;
  always_comb begin
    case (sel)
      4'd0:    cur = 6'(speed);
      4'd1:    cur = num_active;
      4'd2:    cur = 6'(grid_cols);
      4'd3:    cur = 6'(grid_rows);
      4'd4:    cur = 6'(quirks.vf_reset);
      4'd5:    cur = 6'(quirks.shift_vy);
      4'd6:    cur = 6'(quirks.mem_inc_i);
      4'd7:    cur = 6'(quirks.jump_vx);
      4'd8:    cur = 6'(timbre);
      4'd9:    cur = 6'(tone);
      4'd10:   cur = 6'(volume);
      default: cur = audio_inst;
    endcase
    nxt = cur;
    if (inc_e && cur < item_max(sel)) nxt = cur + 6'd1;
    if (dec_e && cur > item_min(sel)) nxt = cur - 6'd1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sel <= '0; speed <= DEF_SPEED; num_active <= DEF_ACTIVE;
      grid_cols <= DEF_COLS; grid_rows <= DEF_ROWS; quirks <= '0;
      timbre <= DEF_TIMBRE; tone <= DEF_TONE; volume <= DEF_VOLUME;
      audio_inst <= '0;
    end else begin
      if (up_e   && sel != 4'd0)               sel <= sel - 4'd1;
      if (down_e && sel != 4'(N_ITEMS - 1))    sel <= sel + 4'd1;
      case (sel)
        4'd0:    speed            <= nxt[3:0];
        4'd1:    num_active       <= nxt;
        4'd2:    grid_cols        <= nxt[2:0];
        4'd3:    grid_rows        <= nxt[2:0];
        4'd4:    quirks.vf_reset  <= nxt[0];
        4'd5:    quirks.shift_vy  <= nxt[0];
        4'd6:    quirks.mem_inc_i <= nxt[0];
        4'd7:    quirks.jump_vx   <= nxt[0];
        4'd8:    timbre           <= nxt[1:0];
        4'd9:    tone             <= nxt[3:0];
        4'd10:   volume           <= nxt[3:0];
        default: audio_inst       <= nxt;
      endcase
    end
  end

  // instruction period for each SPEED value, fixed at elaboration
  logic [19:0] period_lut [16];
  for (genvar g = 0; g < 16; g++) begin : g_period
    assign period_lut[g] = 20'(CLK_HZ / (100 * (g + 1)));
  end
  assign tick_period = period_lut[speed];

  // ---------------- screen updater ----------------
  // Stage 0 walks the cells and either picks a character directly or
  // addresses a name byte; stage 1 writes the character one cycle later.
  function automatic logic [7:0] hex_char(input logic [3:0] d);
    return (d < 4'd10) ? 8'h30 + 8'(d) : 8'h37 + 8'(d);
  endfunction

  logic [5:0]  ucol;
  logic [4:0]  urow;
  logic        scanning;
  logic        s1_valid, s1_from_sym;
  logic [9:0]  s1_addr;
  logic [7:0]  s1_char, sym_q;
  logic [11:0] name_addr;
  logic        use_name;
  logic [7:0]  direct;
  logic [3:0]  item;
  logic [5:0]  val;

  always_comb begin
    item = 4'(urow - 5'd1);
    case (item)
      4'd0:    val = 6'(speed);
      4'd1:    val = num_active;
      4'd2:    val = 6'(grid_cols);
      4'd3:    val = 6'(grid_rows);
      4'd4:    val = 6'(quirks.vf_reset);
      4'd5:    val = 6'(quirks.shift_vy);
      4'd6:    val = 6'(quirks.mem_inc_i);
      4'd7:    val = 6'(quirks.jump_vx);
      4'd8:    val = 6'(timbre);
      4'd9:    val = 6'(tone);
      4'd10:   val = 6'(volume);
      default: val = audio_inst;
    endcase
    direct    = 8'h20;
    use_name  = 1'b0;
    name_addr = '0;
    if (urow >= 5'd1 && urow <= 5'(N_ITEMS)) begin
      if (ucol == 6'd1) begin
        if (item == sel) direct = 8'h3E;
      end else if (ucol >= 6'd3 && ucol <= 6'd10) begin
        use_name  = 1'b1;
        name_addr = 12'(NAME_BASE) + 12'(item) * 12'd8 + 12'(ucol - 6'd3);
      end else if (item == 4'd8) begin
        if (ucol >= 6'd12 && ucol <= 6'd19) begin
          use_name  = 1'b1;
          name_addr = 12'(TIMBRE_NAMES) + 12'(val[1:0]) * 12'd8 + 12'(ucol - 6'd12);
        end
      end else if (item == 4'd1 || item == 4'd11) begin
        if (ucol == 6'd12) direct = hex_char({2'b00, val[5:4]});
        if (ucol == 6'd13) direct = hex_char(val[3:0]);
      end else if (ucol == 6'd12) begin
        direct = hex_char(val[3:0]);
      end
    end
  end

  always_ff @(posedge clk) begin
    sym_q <= sym[name_addr];
    if (s1_valid) scr[s1_addr] <= s1_from_sym ? sym_q : s1_char;
  end

  logic change;
  assign change = up_e || down_e || inc_e || dec_e;

  always_ff @(posedge clk) begin
    if (rst) begin
      dirty <= 1'b1; scanning <= 1'b0; ucol <= '0; urow <= '0;
      s1_valid <= 1'b0; s1_from_sym <= 1'b0; s1_addr <= '0; s1_char <= '0;
    end else begin
      if (change) dirty <= 1'b1;
      s1_valid    <= scanning;
      s1_from_sym <= use_name;
      s1_char     <= direct;
      s1_addr     <= 10'(urow) * 10'(TXT_COLS) + 10'(ucol);
      if (!scanning) begin
        if (dirty && !change) begin
          dirty <= 1'b0; scanning <= 1'b1; ucol <= '0; urow <= '0;
        end
      end else if (ucol == 6'(TXT_COLS - 1)) begin
        ucol <= '0;
        if (urow == 5'(TXT_ROWS - 1)) scanning <= 1'b0;
        else urow <= urow + 5'd1;
      end else begin
        ucol <= ucol + 6'd1;
      end
    end
  end
  assign redraw_busy = scanning || s1_valid || dirty;

  // ---------------- renderer ----------------
  logic [9:0] scr_addr;
  logic       in_text;
  logic [7:0] scr_q, gl_q;
  logic [2:0] gx1, gx2, gy1;
  logic [1:0] in1;
  logic [1:0] act_d, hs_d, vs_d;

  assign in_text  = (hcount[10:5] < 6'(TXT_COLS)) && (vcount[9:5] < 5'(TXT_ROWS));
  assign scr_addr = in_text ? 10'(vcount[9:5]) * 10'(TXT_COLS) + 10'(hcount[10:5]) : '0;

  always_ff @(posedge clk_pixel) begin
    scr_q <= scr[scr_addr];
    gl_q  <= sym[12'({scr_q, gy1})];
    gx1 <= hcount[4:2]; gx2 <= gx1;
    gy1 <= vcount[4:2];
    in1 <= {in1[0], in_text};
    act_d <= {act_d[0], active_in};
    hs_d  <= {hs_d[0], hs_in};
    vs_d  <= {vs_d[0], vs_in};
    if (!act_d[1])                      menu_pixel <= 24'h000000;
    else if (in1[1] && gl_q[3'd7 - gx2]) menu_pixel <= COLOR_TEXT;
    else                                menu_pixel <= COLOR_BG;
    menu_active <= act_d[1];
    menu_hs     <= hs_d[1];
    menu_vs     <= vs_d[1];
  end

endmodule
