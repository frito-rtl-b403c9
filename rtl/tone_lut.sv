// tone_lut: maps the 4-bit tone setting onto the phase increment that makes a
// wave generator, stepped at F_SAMPLE (3 kHz), play that tone.
// Tone t plays f(t) = 155 + 85*t Hz (155 Hz .. 1430 Hz, below the 1.5 kHz
// limit of a 3 kHz sample rate), and the increment is
// round(f(t) * 65536 / F_SAMPLE). The existence of this table follows the
// design description. The even 85 Hz spacing is this implementation's
// choice, made so that the table contains 325 Hz (t = 2) and 750 Hz (t = 7),
// the two tones the original was measured at.
module tone_lut #(
  parameter int unsigned F_SAMPLE = 3000
) (
  input  logic [3:0]  tone,
  output logic [15:0] phase_inc
);
  function automatic logic [15:0] inc_for(input int unsigned t);
    return 16'(((155 + 85 * t) * 65536 + F_SAMPLE / 2) / F_SAMPLE);
  endfunction

  logic [15:0] table_q [16];
  for (genvar g = 0; g < 16; g++) begin : g_tab
    assign table_q[g] = inc_for(g);
  end
  assign phase_inc = table_q[tone];
endmodule
