// chip8_video_mux: the video multiplexer. It shows the video buffers of the
// active Chip-8 instances side by side on the 1280x720 screen, in a grid of
// grid_cols x grid_rows cells (1..6 each), instance r*grid_cols + c in row r,
// column c.
//
// Layout: once per frame, at new_frame (start of vertical blanking), a small
// state machine uses the divider to compute the largest integer scale S with
// 64*S*cols <= H_ACTIVE and 32*S*rows <= V_ACTIVE, then the padding that spaces
// the cells evenly, pad_h = (H_ACTIVE - 64*S*cols) / (cols + 1) and likewise
// pad_v. For 6x6 this gives S = 3, pad_h = 18, pad_v = 20. The results are
// adopted together when all four divisions are done, so a frame is always
// drawn with one consistent layout.
// Pixel mapping: two grid_axis_tracker instances walk the grid along hcount
// and vcount, giving the instance and the Chip-8 pixel under the current
// screen pixel without any per-pixel division. The video-buffer byte holding
// that pixel is requested on the memory's read port B
// (hdmi_mem_addr = instance*256 + 8*y + x/8; with at most 36 instances its
// top two bits are always zero). The byte arrives two cycles
// later, so the sync, blanking and bit-select signals are delayed by two
// cycles to stay aligned: every output lags the signal generator by 2 cycles.
// hdmi_pixel is COLOR_ON / COLOR_OFF for a lit / dark Chip-8 pixel, COLOR_BG
// for the padding and for cells whose instance is not active, and black outside
// the picture. That a division module computes the padding follows the design
// description; the rest of the layout arithmetic and the colours are this
// implementation's choices.
module chip8_video_mux #(
  parameter int unsigned H_ACTIVE = 1280,
  parameter int unsigned H_TOTAL  = 1650,
  parameter int unsigned V_ACTIVE = 720,
  parameter int unsigned V_TOTAL  = 750,
  parameter logic [23:0] COLOR_ON  = 24'hFFFFFF,
  parameter logic [23:0] COLOR_OFF = 24'h202020,
  parameter logic [23:0] COLOR_BG  = 24'h000040
) (
  input  logic        clk_pixel,
  input  logic        rst,
  input  logic [2:0]  grid_cols,
  input  logic [2:0]  grid_rows,
  input  logic [5:0]  num_active,
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  input  logic        hor_sync_in,
  input  logic        vert_sync_in,
  input  logic        active_draw_in,
  input  logic        new_frame,
  output logic [15:0] hdmi_mem_addr,
  input  logic [7:0]  hdmi_mem_data,
  output logic [23:0] hdmi_pixel,
  output logic        pixel_value,
  output logic        hor_sync,
  output logic        vert_sync,
  output logic        active_draw
);

  // ---------------- layout computation ----------------
  typedef enum logic [2:0] {L_IDLE, L_SH, L_SV, L_PH, L_PV} lstate_t;
  lstate_t     lstate;
  logic [2:0]  cols, rows, cols_a, rows_a;
  logic [4:0]  sh, scale, scale_a;
  logic [10:0] pad_h, pad_v, pad_h_a;
  logic        div_start, div_busy, div_done;
  logic [15:0] div_n, div_d, div_q, div_r;

  assign cols = (grid_cols == 3'd0) ? 3'd1 : (grid_cols > 3'd6) ? 3'd6 : grid_cols;
  assign rows = (grid_rows == 3'd0) ? 3'd1 : (grid_rows > 3'd6) ? 3'd6 : grid_rows;

  divider #(.WIDTH(16)) u_div (
    .clk(clk_pixel), .rst(rst), .start(div_start), .dividend(div_n), .divisor(div_d),
    .quotient(div_q), .remainder(div_r), .busy(div_busy), .done(div_done)
  );

  always_comb begin
    div_start = 1'b0;
    div_n     = '0;
    div_d     = 16'd1;
    unique case (lstate)
      L_SH: begin div_n = 16'(H_ACTIVE); div_d = 16'(cols_a) * 16'd64; end
      L_SV: begin div_n = 16'(V_ACTIVE); div_d = 16'(rows_a) * 16'd32; end
      L_PH: begin div_n = 16'(H_ACTIVE) - 16'(cols_a) * 16'd64 * 16'(scale_a);
                  div_d = 16'(cols_a) + 16'd1; end
      L_PV: begin div_n = 16'(V_ACTIVE) - 16'(rows_a) * 16'd32 * 16'(scale_a);
                  div_d = 16'(rows_a) + 16'd1; end
      default: ;
    endcase
    if (lstate != L_IDLE && !div_busy && !div_done) div_start = 1'b1;
  end

  logic [2:0] cols_l, rows_l;     // grid in use for the frame being drawn
  logic [5:0] act_l;

  always_ff @(posedge clk_pixel) begin
    if (rst) begin
      lstate  <= L_IDLE;
      cols_a  <= 3'd1; rows_a <= 3'd1; sh <= 5'd1; scale_a <= 5'd1;
      pad_h_a <= '0;
      cols_l  <= 3'd1; rows_l <= 3'd1; scale <= 5'd1; pad_h <= '0; pad_v <= '0;
      act_l   <= 6'd1;
    end else begin
      unique case (lstate)
        L_IDLE: if (new_frame) begin
          cols_a <= cols;
          rows_a <= rows;
          lstate <= L_SH;
        end
        L_SH: if (div_done) begin sh <= 5'(div_q); lstate <= L_SV; end
        L_SV: if (div_done) begin
          scale_a <= (5'(div_q) < sh) ? 5'(div_q) : sh;
          lstate  <= L_PH;
        end
        L_PH: if (div_done) begin pad_h_a <= 11'(div_q); lstate <= L_PV; end
        L_PV: if (div_done) begin
          // adopt the whole layout at once, still inside vertical blanking
          pad_v  <= 11'(div_q);
          pad_h  <= pad_h_a;
          scale  <= (scale_a == 5'd0) ? 5'd1 : scale_a;
          cols_l <= cols_a;
          rows_l <= rows_a;
          act_l  <= num_active;
          lstate <= L_IDLE;
        end
        default: lstate <= L_IDLE;
      endcase
    end
  end

  // ---------------- pixel mapping ----------------
  logic       line_end, frame_end;
  logic       h_in, v_in;
  logic [2:0] h_idx, v_idx;
  logic [5:0] h_pix, v_pix;

  assign line_end  = (int'(hcount) == int'(H_TOTAL) - 1);
  assign frame_end = line_end && (int'(vcount) == int'(V_TOTAL) - 1);

  grid_axis_tracker #(.CELL(64)) u_h (
    .clk(clk_pixel), .init(rst || line_end), .step(1'b1), .pad(pad_h), .scale(scale),
    .count(cols_l), .in_cell(h_in), .idx(h_idx), .pix(h_pix)
  );
  grid_axis_tracker #(.CELL(32)) u_v (
    .clk(clk_pixel), .init(rst || frame_end), .step(line_end), .pad(pad_v), .scale(scale),
    .count(rows_l), .in_cell(v_in), .idx(v_idx), .pix(v_pix)
  );

  logic [5:0] inst;
  logic       show;
  assign inst = 6'(v_idx) * 6'(cols_l) + 6'(h_idx);
  assign show = h_in && v_in && (inst < act_l);
  assign hdmi_mem_addr = {2'b00, inst, v_pix[4:0], h_pix[5:3]};

  // Two-stage alignment with the memory read.
  logic [1:0] show_d, hs_d, vs_d, ad_d;
  logic [2:0] bit_d [2];
  always_ff @(posedge clk_pixel) begin
    show_d <= {show_d[0], show};
    hs_d   <= {hs_d[0], hor_sync_in};
    vs_d   <= {vs_d[0], vert_sync_in};
    ad_d   <= {ad_d[0], active_draw_in};
    bit_d[0] <= h_pix[2:0];
    bit_d[1] <= bit_d[0];
  end

  assign pixel_value = show_d[1] && hdmi_mem_data[3'd7 - bit_d[1]];
  assign hor_sync    = hs_d[1];
  assign vert_sync   = vs_d[1];
  assign active_draw = ad_d[1];
  assign hdmi_pixel  = !ad_d[1]   ? 24'h000000 :
                       !show_d[1] ? COLOR_BG :
                       pixel_value ? COLOR_ON : COLOR_OFF;

endmodule
