// square_wave: one of the four waveform generators of the audio module.
// A phase accumulator advances by phase_inc on each sample trigger; its top six
// bits index a 64-entry table holding one period of a square: 255 for the first half of the period (i < 32), 0 for the second.
// amp_out is an unsigned 8-bit amplitude, registered, so it follows the phase
// by one clock. Having one module per waveform, the trigger-driven phase and
// the 6-bit table index follow the design description; the table contents are
// the textbook shape of the wave.
module square_wave (
  input  logic        clk,
  input  logic        rst,
  input  logic        trigger,
  input  logic [15:0] phase_inc,
  output logic [7:0]  amp_out
);
  logic [5:0] idx;
  phase_accum u_phase (.clk(clk), .rst(rst), .trigger(trigger), .phase_inc(phase_inc), .phase_idx(idx));
  always_ff @(posedge clk) amp_out <= idx[5] ? 8'd0 : 8'd255;
endmodule
