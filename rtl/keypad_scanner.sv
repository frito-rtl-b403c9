// keypad_scanner: the input module. It scans a 4x4 matrix keypad whose four
// row lines (pmoda[3:0], inputs) are pulled up to 3.3 V and whose four column
// lines (pmodb[3:0], outputs) are driven by this module.
//
// A scan drives one column low and the others high, then reads the rows: a row
// that reads 0 has its key in that column pressed. Each column takes two
// cycles (drive, then sample), so the whole keypad is polled every 8 cycles,
// as in the design description. keys_pressed[4*r + c] is 1 while the key at row
// r, column c is pressed; every bit is refreshed once per scan. Mapping the
// physical key positions onto Chip-8 key values is left to the keypad labels
// (the bit index is taken as the key value). Rows are sampled without a
// synchronizer so that the 8-cycle poll stays exact; a key's bit settles one
// scan after a change.
module keypad_scanner (
  input  logic        clk,
  input  logic        rst,
  input  logic [3:0]  rows,          // pmoda[3:0]
  output logic [3:0]  cols,          // pmodb[3:0]
  output logic [15:0] keys_pressed
);

  logic [2:0] phase;                 // {column, sample-cycle}
  logic [1:0] col;
  assign col = phase[2:1];

  always_ff @(posedge clk) begin
    if (rst) begin
      phase        <= '0;
      cols         <= 4'b1110;
      keys_pressed <= '0;
    end else begin
      phase <= phase + 3'd1;
      if (phase[0]) begin
        for (int r = 0; r < 4; r++) keys_pressed[4*r + int'(col)] <= ~rows[r];
        cols <= ~(4'b0001 << (col + 2'd1));      // drive the next column
      end
    end
  end

endmodule
