// pdm: first-order pulse-density modulator (sigma-delta) that turns the
// 8-bit sample into the one-bit audio output, running at the full audio clock
// so the 3 kHz samples are upsampled by the filter in the board's audio
// output. Each cycle the sample is added to an 8-bit accumulator and the carry
// is the output bit; the density of ones is sample/256. The modulator type is
// this implementation's choice.
module pdm (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] level,
  output logic       pdm_out
);
  logic [7:0] acc;
  logic [8:0] sum;
  assign sum = {1'b0, acc} + {1'b0, level};
  always_ff @(posedge clk) begin
    if (rst) begin
      acc     <= '0;
      pdm_out <= 1'b0;
    end else begin
      acc     <= sum[7:0];
      pdm_out <= sum[8];
    end
  end
endmodule
