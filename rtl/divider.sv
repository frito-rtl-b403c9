// divider: the division module, a sequential restoring divider for unsigned
// WIDTH-bit operands.
//
// A start pulse (ignored while busy) latches dividend and divisor; one quotient
// bit is produced per cycle, and WIDTH cycles later done pulses for one cycle
// with quotient and remainder valid until the next start. Division by zero
// gives an all-ones quotient and the dividend as remainder. The design names a
// division module for the video multiplexer's layout; the restoring algorithm
// is this implementation's choice.
module divider #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic [WIDTH-1:0] dividend,
  input  logic [WIDTH-1:0] divisor,
  output logic [WIDTH-1:0] quotient,
  output logic [WIDTH-1:0] remainder,
  output logic             busy,
  output logic             done
);

  logic [WIDTH-1:0]         d;
  logic [$clog2(WIDTH+1)-1:0] n;
  logic [WIDTH:0]           trial;

  assign trial = {remainder, quotient[WIDTH-1]} - {1'b0, d};

  always_ff @(posedge clk) begin
    if (rst) begin
      quotient  <= '0;
      remainder <= '0;
      d         <= '0;
      n         <= '0;
      busy      <= 1'b0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          quotient  <= dividend;
          remainder <= '0;
          d         <= divisor;
          n         <= '0;
          busy      <= 1'b1;
        end
      end else begin
        // shift the next dividend bit into the partial remainder
        if (!trial[WIDTH]) begin
          remainder <= trial[WIDTH-1:0];
          quotient  <= {quotient[WIDTH-2:0], 1'b1};
        end else begin
          remainder <= {remainder[WIDTH-2:0], quotient[WIDTH-1]};
          quotient  <= {quotient[WIDTH-2:0], 1'b0};
        end
        n <= n + 1'b1;
        if (int'(n) == int'(WIDTH) - 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
