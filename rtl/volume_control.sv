// volume_control: scales an unsigned 8-bit sample by the 4-bit volume
// setting: out = (in * volume) / 16, so volume 0 is silence and 15 is
// 15/16 of full scale. Registered, one cycle of latency. The linear scaling
// is this implementation's choice; the module's role follows the design.
module volume_control (
  input  logic       clk,
  input  logic [7:0] in,
  input  logic [3:0] volume,
  output logic [7:0] out
);
  logic [11:0] prod;
  assign prod = 12'(in) * 12'(volume);
  always_ff @(posedge clk) out <= prod[11:4];
endmodule
