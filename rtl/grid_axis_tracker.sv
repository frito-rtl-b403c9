// grid_axis_tracker: follows one screen axis of the video multiplexer's grid,
// one pixel (or line) per step, without dividing.
//
// Along the axis the grid is: pad, cell 0, pad, cell 1, ..., cell count-1, and
// then unused space. A cell is CELL Chip-8 pixels, each shown scale screen
// pixels wide. init loads the state of the axis' first position; each step
// advances by one screen pixel. in_cell is high inside a cell, idx is the cell
// number and pix the Chip-8 pixel coordinate inside it. pad, scale (>= 1) and
// count (>= 1) must be stable while the axis is being walked.
module grid_axis_tracker #(
  parameter int unsigned CELL = 64
) (
  input  logic        clk,
  input  logic        init,
  input  logic        step,
  input  logic [10:0] pad,
  input  logic [4:0]  scale,
  input  logic [2:0]  count,
  output logic        in_cell,
  output logic [2:0]  idx,
  output logic [5:0]  pix
);

  logic [10:0] pcnt;    // position inside the current pad
  logic [4:0]  sub;     // screen pixel inside the current Chip-8 pixel
  logic        done;    // past the last cell

  always_ff @(posedge clk) begin
    if (init) begin
      idx     <= '0;
      pix     <= '0;
      sub     <= '0;
      pcnt    <= '0;
      done    <= 1'b0;
      in_cell <= (pad == 11'd0);
    end else if (step && !done) begin
      if (!in_cell) begin
        if (pcnt + 11'd1 >= pad) begin
          in_cell <= 1'b1;
          pix     <= '0;
          sub     <= '0;
        end else begin
          pcnt <= pcnt + 11'd1;
        end
      end else if (sub + 5'd1 < scale) begin
        sub <= sub + 5'd1;
      end else begin
        sub <= '0;
        if (int'(pix) == int'(CELL) - 1) begin
          pix  <= '0;
          pcnt <= '0;
          if (idx + 3'd1 >= count) begin
            done    <= 1'b1;
            in_cell <= 1'b0;
          end else begin
            idx     <= idx + 3'd1;
            in_cell <= (pad == 11'd0);
          end
        end else begin
          pix <= pix + 6'd1;
        end
      end
    end
  end

endmodule
