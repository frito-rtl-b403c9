// sine_wave: one of the four waveform generators of the audio module.
// A phase accumulator advances by phase_inc on each sample trigger; its top six
// bits index a 64-entry table holding one period of a sine: amp = round(127.5 + 127.5*sin(2*pi*i/64)) for table index i.
// amp_out is an unsigned 8-bit amplitude, registered, so it follows the phase
// by one clock. Having one module per waveform, the trigger-driven phase and
// the 6-bit table index follow the design description; the table contents are
// the textbook shape of the wave.
module sine_wave (
  input  logic        clk,
  input  logic        rst,
  input  logic        trigger,
  input  logic [15:0] phase_inc,
  output logic [7:0]  amp_out
);
  logic [5:0] idx;
  phase_accum u_phase (.clk(clk), .rst(rst), .trigger(trigger), .phase_inc(phase_inc), .phase_idx(idx));
  localparam logic [7:0] SINE [64] = '{
    8'd128, 8'd140, 8'd152, 8'd165, 8'd176, 8'd188, 8'd198, 8'd208,
    8'd218, 8'd226, 8'd234, 8'd240, 8'd245, 8'd250, 8'd253, 8'd254,
    8'd255, 8'd254, 8'd253, 8'd250, 8'd245, 8'd240, 8'd234, 8'd226,
    8'd218, 8'd208, 8'd198, 8'd188, 8'd176, 8'd165, 8'd152, 8'd140,
    8'd128, 8'd115, 8'd103, 8'd90,  8'd79,  8'd67,  8'd57,  8'd47,
    8'd37,  8'd29,  8'd21,  8'd15,  8'd10,  8'd5,   8'd2,   8'd1,
    8'd0,   8'd1,   8'd2,   8'd5,   8'd10,  8'd15,  8'd21,  8'd29,
    8'd37,  8'd47,  8'd57,  8'd67,  8'd79,  8'd90,  8'd103, 8'd115};
  always_ff @(posedge clk) amp_out <= SINE[idx];
endmodule
