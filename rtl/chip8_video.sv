// chip8_video: the video module. It carries out the two Chip-8 instructions
// that touch the 64x32 video buffer, clear screen (CLS) and draw sprite (DXYN),
// on behalf of the processor, entirely through the shared memory port.
//
// The video buffer is 256 bytes in the instance's state area, 8 bytes per row,
// the most significant bit of a byte being the leftmost of its 8 pixels.
// - video_clear_buffer (one-cycle pulse): writes zero to all 256 bytes.
// - video_draw_sprite (one-cycle pulse): draws video_sprite_height rows of
//   one-byte sprite data read from program memory at video_sprite_addr, with
//   the top-left corner at (video_sprite_x, video_sprite_y). For each row it
//   reads the sprite byte, then for each of the (usually two) video bytes the
//   shifted sprite byte overlaps it reads the old byte, XORs and writes it
//   back. Pixels that fall right of column 63 or below row 31 are clipped;
//   wrapping of a start position that is fully off screen is done by the
//   caller, which passes the position modulo 64/32.
// video_done_drawing pulses for one cycle when the operation is complete;
// video_collision (valid from then until the next command) is high if any
// pixel was switched off. Requests follow chip8_memory's ready/valid rules.
// Operation and clipping follow the design description; the state sequence and
// the fact that the pieces are processed one after another are this
// implementation's choices. Timing: a clear takes 256 write cycles plus 2;
// a sprite row takes about 12 cycles.
module chip8_video
  import chip8_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        video_clear_buffer,
  input  logic        video_draw_sprite,
  input  logic [11:0] video_sprite_addr,
  input  logic [5:0]  video_sprite_x,
  input  logic [4:0]  video_sprite_y,
  input  logic [3:0]  video_sprite_height,
  output logic        video_collision,
  output logic        video_done_drawing,
  output mem_req_t    video_req,
  input  logic        video_mem_ready,
  input  logic        video_mem_valid,
  input  logic [7:0]  mem_data
);

  typedef enum logic [3:0] {
    V_IDLE, V_CLEAR, V_ROW, V_SPR_WAIT, V_OLD_RD, V_OLD_WAIT, V_OLD_WR, V_DONE
  } vstate_t;

  vstate_t     state;
  logic [7:0]  idx;        // byte counter for clear
  logic [11:0] base;
  logic [5:0]  x;
  logic [4:0]  y;
  logic [3:0]  height, row;
  logic [7:0]  spr;        // sprite byte of the current row
  logic        half;       // 0 = left video byte, 1 = right video byte
  logic [7:0]  old;

  logic [5:0]  py;         // screen row of the current sprite row
  logic [7:0]  vbyte;      // video-buffer byte addressed now
  logic [7:0]  part;       // sprite bits falling into that byte
  logic        has_right;  // the row spills into a second byte on screen

  assign py        = 6'(y) + 6'(row);
  assign vbyte     = {py[4:0], x[5:3] + 3'(half)};
  assign part      = half ? 8'(spr << (4'd8 - 4'(x[2:0]))) : (spr >> x[2:0]);
  assign has_right = (x[2:0] != 3'd0) && (x[5:3] != 3'd7);

  always_comb begin
    video_req = '0;
    unique case (state)
      V_CLEAR: video_req = '{valid_req: 1'b1, we: 1'b1, mem_type: MEM_STATE,
                             addr: ST_VRAM + 12'(idx), data: 8'h00};
      V_ROW:   if (row != height && py < 6'd32)
                 video_req = '{valid_req: 1'b1, we: 1'b0, mem_type: MEM_RAM,
                               addr: base + 12'(row), data: 8'h00};
      V_OLD_RD: video_req = '{valid_req: 1'b1, we: 1'b0, mem_type: MEM_STATE,
                              addr: ST_VRAM + 12'(vbyte), data: 8'h00};
      V_OLD_WR: video_req = '{valid_req: 1'b1, we: 1'b1, mem_type: MEM_STATE,
                              addr: ST_VRAM + 12'(vbyte), data: old ^ part};
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state              <= V_IDLE;
      video_collision    <= 1'b0;
      video_done_drawing <= 1'b0;
      idx <= '0; row <= '0; half <= 1'b0;
      base <= '0; x <= '0; y <= '0; height <= '0; spr <= '0; old <= '0;
    end else begin
      video_done_drawing <= 1'b0;
      unique case (state)
        V_IDLE: begin
          if (video_clear_buffer) begin
            idx             <= '0;
            video_collision <= 1'b0;
            state           <= V_CLEAR;
          end else if (video_draw_sprite) begin
            base            <= video_sprite_addr;
            x               <= video_sprite_x;
            y               <= video_sprite_y;
            height          <= video_sprite_height;
            row             <= '0;
            video_collision <= 1'b0;
            state           <= V_ROW;
          end
        end
        V_CLEAR: if (video_mem_ready) begin
          idx <= idx + 8'd1;
          if (idx == 8'hFF) state <= V_DONE;
        end
        V_ROW: begin
          if (row == height || py >= 6'd32) state <= V_DONE;   // finished or clipped
          else if (video_mem_ready) state <= V_SPR_WAIT;
        end
        V_SPR_WAIT: if (video_mem_valid) begin
          spr   <= mem_data;
          half  <= 1'b0;
          state <= V_OLD_RD;
        end
        V_OLD_RD: if (video_mem_ready) state <= V_OLD_WAIT;
        V_OLD_WAIT: if (video_mem_valid) begin
          old   <= mem_data;
          state <= V_OLD_WR;
        end
        V_OLD_WR: if (video_mem_ready) begin
          if ((old & part) != 8'h00) video_collision <= 1'b1;
          if (!half && has_right) begin
            half  <= 1'b1;
            state <= V_OLD_RD;
          end else begin
            row   <= row + 4'd1;
            state <= V_ROW;
          end
        end
        V_DONE: begin
          video_done_drawing <= 1'b1;
          state              <= V_IDLE;
        end
        default: state <= V_IDLE;
      endcase
    end
  end

endmodule
