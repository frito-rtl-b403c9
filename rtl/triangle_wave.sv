// triangle_wave: one of the four waveform generators of the audio module.
// A phase accumulator advances by phase_inc on each sample trigger; its top six
// bits index a 64-entry table holding one period of a triangle: rising for i < 32, falling after; with t = i (i < 32) or 63 - i, amp = {t[4:0], t[4:2]} (0..255).
// amp_out is an unsigned 8-bit amplitude, registered, so it follows the phase
// by one clock. Having one module per waveform, the trigger-driven phase and
// the 6-bit table index follow the design description; the table contents are
// the textbook shape of the wave.
module triangle_wave (
  input  logic        clk,
  input  logic        rst,
  input  logic        trigger,
  input  logic [15:0] phase_inc,
  output logic [7:0]  amp_out
);
  logic [5:0] idx;
  phase_accum u_phase (.clk(clk), .rst(rst), .trigger(trigger), .phase_inc(phase_inc), .phase_idx(idx));
  logic [4:0] t;
  assign t = idx[5] ? ~idx[4:0] : idx[4:0];
  always_ff @(posedge clk) amp_out <= {t, t[4:2]};
endmodule
