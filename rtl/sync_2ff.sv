// sync_2ff: two-flip-flop synchronizer for a WIDTH-bit signal entering the
// clk domain. Intended for single bits and for quasi-static settings that
// change only while the user edits them; adds two cycles of latency.
module sync_2ff #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] meta;
  always_ff @(posedge clk) begin
    meta <= d;
    q    <= meta;
  end
endmodule
