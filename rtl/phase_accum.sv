// phase_accum: the phase accumulator shared by the four wave generators.
// On every trigger (one pulse per 3 kHz audio sample) the 16-bit phase grows
// by phase_inc, wrapping around; phase_idx is its top 6 bits, the index into a
// 64-entry waveform table. The output frequency is
// f = phase_inc * f_sample / 65536. The 16-bit width is this implementation's
// choice; the trigger-and-increment scheme and the 6-bit index follow the
// design description.
module phase_accum (
  input  logic        clk,
  input  logic        rst,
  input  logic        trigger,
  input  logic [15:0] phase_inc,
  output logic [5:0]  phase_idx
);
  logic [15:0] phase;
  always_ff @(posedge clk) begin
    if (rst)          phase <= '0;
    else if (trigger) phase <= phase + phase_inc;
  end
  assign phase_idx = phase[15:10];
endmodule
