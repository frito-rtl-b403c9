// chip8_mem_core: the complete state of one Chip-8 instance in one dual-port
// byte-wide block RAM of CORE_BYTES (4407) bytes.
//
// Port A (clk_a, read/write) serves the processor, video and debug modules
// through chip8_memory; port B (clk_b, read-only) serves the video multiplexer
// on the pixel clock. Both ports have a read latency of two clock cycles: the
// address is registered together with the array read, and the data is
// registered once more (the output register of the block RAM). Port A is
// read-first on a write to the address being read.
//
// The memory is initialised at build time, as the design keeps game ROMs in the
// bitstream: the hexadecimal font at 0x000, the program from ROM_FILE at 0x200
// (a $readmemh file; an empty name leaves program memory zero), PC = 0x200 and
// everything else zero. Storing the font at 0x000 is this implementation's
// choice; the state-area layout is given in chip8_pkg.
module chip8_mem_core
  import chip8_pkg::*;
#(
  parameter string ROM_FILE = "rtl/chip8_demo_rom.hex"
) (
  input  logic               clk_a,
  input  logic               we_a,
  input  logic [CORE_AW-1:0] addr_a,
  input  logic [7:0]         din_a,
  output logic [7:0]         dout_a,
  input  logic               clk_b,
  input  logic [CORE_AW-1:0] addr_b,
  output logic [7:0]         dout_b
);

  logic [7:0] mem [CORE_BYTES];
  logic [7:0] rd_a, rd_b;

  initial begin
    for (int i = 0; i < int'(CORE_BYTES); i++) mem[i] = 8'h00;
    for (int i = 0; i < 80; i++) mem[int'(FONT_START) + i] = font_byte(i);
    if (ROM_FILE != "") $readmemh(ROM_FILE, mem, int'(PROG_START));
    mem[int'(RAM_BYTES) + int'(ST_PC)]     = 8'(PROG_START >> 8);
    mem[int'(RAM_BYTES) + int'(ST_PC) + 1] = PROG_START[7:0];
  end

  always_ff @(posedge clk_a) begin
    if (we_a) mem[addr_a] <= din_a;
    rd_a   <= mem[addr_a];
    dout_a <= rd_a;
  end

  always_ff @(posedge clk_b) begin
    rd_b   <= mem[addr_b];
    dout_b <= rd_b;
  end

endmodule
