// video_sig_gen: the video signal generator for the 1280x720 HDMI output,
// clocked by the 74.25 MHz pixel clock.
//
// hcount runs 0..H_TOTAL-1 along a line and vcount 0..V_TOTAL-1 down the
// frame; active_draw is high inside the H_ACTIVE x V_ACTIVE picture, and the
// sync pulses (active high) follow the front porches. new_frame pulses for one
// cycle at the first pixel after the picture (hcount = H_ACTIVE,
// vcount = V_ACTIVE), the start of vertical blanking. The defaults are the
// standard CEA-861 720p60 timing, which the design uses but does not list.
// All outputs are registered and change together.
module video_sig_gen #(
  parameter int unsigned H_ACTIVE = 1280,
  parameter int unsigned H_FP     = 110,
  parameter int unsigned H_SYNC   = 40,
  parameter int unsigned H_BP     = 220,
  parameter int unsigned V_ACTIVE = 720,
  parameter int unsigned V_FP     = 5,
  parameter int unsigned V_SYNC   = 5,
  parameter int unsigned V_BP     = 20
) (
  input  logic        clk_pixel,
  input  logic        rst,
  output logic [10:0] hcount,
  output logic [9:0]  vcount,
  output logic        hor_sync,
  output logic        vert_sync,
  output logic        active_draw,
  output logic        new_frame
);

  localparam int unsigned H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;

  logic [10:0] h;
  logic [9:0]  v;

  always_ff @(posedge clk_pixel) begin
    if (rst) begin
      h <= '0;
      v <= '0;
    end else if (int'(h) == int'(H_TOTAL) - 1) begin
      h <= '0;
      v <= (int'(v) == int'(V_TOTAL) - 1) ? '0 : v + 10'd1;
    end else begin
      h <= h + 11'd1;
    end
  end

  assign hcount      = h;
  assign vcount      = v;
  assign active_draw = (int'(h) < int'(H_ACTIVE)) && (int'(v) < int'(V_ACTIVE));
  assign hor_sync    = (int'(h) >= int'(H_ACTIVE + H_FP)) && (int'(h) < int'(H_ACTIVE + H_FP + H_SYNC));
  assign vert_sync   = (int'(v) >= int'(V_ACTIVE + V_FP)) && (int'(v) < int'(V_ACTIVE + V_FP + V_SYNC));
  assign new_frame   = (int'(h) == int'(H_ACTIVE)) && (int'(v) == int'(V_ACTIVE));

endmodule
