// chip8_audio: the audio module. It plays the selected waveform (timbre) at
// the selected tone and volume while active_in (the running instance's sound
// timer is nonzero) is high, as a one-bit PDM stream for the board's audio jack.
//
// Chain: a sample-rate counter divides the audio clock (about 98.3 MHz) by
// DECIM to make the 3 kHz sample trigger; tone_lut gives the phase increment;
// all four wave generators run in parallel; the timbre selects one
// (0 sine, 1 triangle, 2 square, 3 sawtooth, the order the settings menu lists
// them); the sample is forced to 0 while active_in is low; volume_control
// scales it; pdm modulates it. amp_out is the selected wave before gating.
// The chain follows the design description. The description gives a
// decimation factor of 1024 but also a 3 kHz sample rate; 98.304 MHz / 1024 is
// 96 kHz, so DECIM defaults to 32768, which gives exactly 3 kHz.
module chip8_audio #(
  parameter int unsigned DECIM = 32768
) (
  input  logic       clk_audio,
  input  logic       rst,
  input  logic [1:0] timbre,
  input  logic [3:0] tone,
  input  logic [3:0] volume,
  input  logic       active_in,
  output logic [7:0] amp_out,
  output logic [7:0] level,
  output logic       audio_out
);

  logic [$clog2(DECIM)-1:0] cnt;
  logic        trigger;
  logic [15:0] phase_inc;
  logic [7:0]  a_sine, a_tri, a_sq, a_saw, gated;

  always_ff @(posedge clk_audio) begin
    if (rst) begin
      cnt     <= '0;
      trigger <= 1'b0;
    end else begin
      trigger <= (int'(cnt) == int'(DECIM) - 1);
      cnt     <= (int'(cnt) == int'(DECIM) - 1) ? '0 : cnt + 1'b1;
    end
  end

  tone_lut #(.F_SAMPLE(3000)) u_tone (.tone(tone), .phase_inc(phase_inc));

  sine_wave     u_sine (.clk(clk_audio), .rst(rst), .trigger(trigger), .phase_inc(phase_inc), .amp_out(a_sine));
  triangle_wave u_tri  (.clk(clk_audio), .rst(rst), .trigger(trigger), .phase_inc(phase_inc), .amp_out(a_tri));
  square_wave   u_sq   (.clk(clk_audio), .rst(rst), .trigger(trigger), .phase_inc(phase_inc), .amp_out(a_sq));
  sawtooth_wave u_saw  (.clk(clk_audio), .rst(rst), .trigger(trigger), .phase_inc(phase_inc), .amp_out(a_saw));

  always_comb begin
    unique case (timbre)
      2'd0: amp_out = a_sine;
      2'd1: amp_out = a_tri;
      2'd2: amp_out = a_sq;
      default: amp_out = a_saw;
    endcase
  end
  assign gated = active_in ? amp_out : 8'd0;

  volume_control u_vc (.clk(clk_audio), .in(gated), .volume(volume), .out(level));
  pdm u_pdm (.clk(clk_audio), .rst(rst), .level(level), .pdm_out(audio_out));

endmodule
