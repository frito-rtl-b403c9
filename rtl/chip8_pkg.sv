// chip8_pkg: types and constants shared by the Chip-8 emulator.
//
// Every emulated Chip-8 instance keeps its whole state in one byte-wide memory
// core of 4407 bytes: 4096 bytes of program memory followed by a 311-byte
// "state" area (video buffer, V registers, stack, PC, I, SP and the two timers).
// Requesters address a core with a 12-bit address and a one-bit region type:
// MEM_RAM selects program memory, MEM_STATE selects the state area, so the core
// address is {type ? 4096 + addr : addr}. The total size and the content of the
// state area follow the design description; the order of the fields inside the
// state area is this implementation's choice.
package chip8_pkg;

  localparam int unsigned RAM_BYTES   = 4096;
  localparam int unsigned CORE_BYTES  = 4407;
  localparam int unsigned CORE_AW     = 13;     // address width of one core

  // Offsets inside the state area (type MEM_STATE).
  localparam logic [11:0] ST_VRAM  = 12'd0;     // 256 bytes, 8 bytes per row, MSB = leftmost pixel
  localparam logic [11:0] ST_V     = 12'd256;   // V0..VF
  localparam logic [11:0] ST_STACK = 12'd272;   // 16 entries of 2 bytes, high byte first
  localparam logic [11:0] ST_PC    = 12'd304;   // PC high, PC low
  localparam logic [11:0] ST_I     = 12'd306;   // I high, I low
  localparam logic [11:0] ST_SP    = 12'd308;
  localparam logic [11:0] ST_DT    = 12'd309;
  localparam logic [11:0] ST_ST    = 12'd310;

  localparam logic [11:0] PROG_START = 12'h200;
  localparam logic [11:0] FONT_START = 12'h000;

  // Region selector sent with every request.
  typedef enum logic {
    MEM_RAM   = 1'b0,
    MEM_STATE = 1'b1
  } mem_type_t;

  // One requester's side of the shared memory port (processor, video, debug).
  typedef struct packed {
    logic        valid_req;  // request present; held until ready
    logic        we;         // 1 = write data, 0 = read
    mem_type_t   mem_type;   // region of addr
    logic [11:0] addr;
    logic [7:0]  data;       // write data
  } mem_req_t;

  // Read latency of a memory core (registered address and registered output).
  localparam int unsigned MEM_LATENCY = 2;

  // Compatibility options ("quirks") that the configuration menu can set.
  typedef struct packed {
    logic vf_reset;    // 8XY1/2/3 clear VF
    logic shift_vy;    // 8XY6/8XYE shift VY into VX (otherwise VX in place)
    logic mem_inc_i;   // FX55/FX65 leave I incremented by X+1
    logic jump_vx;     // BNNN adds VX (X = N[11:8]) instead of V0
  } quirks_t;

  // Core address of a (type, addr) request.
  function automatic logic [CORE_AW-1:0] core_addr(input mem_type_t t, input logic [11:0] a);
    return (t == MEM_STATE) ? CORE_AW'(RAM_BYTES) + CORE_AW'(a) : CORE_AW'(a);
  endfunction

  // The built-in 4x5 hexadecimal font, 5 bytes per digit, stored at FONT_START.
  function automatic logic [7:0] font_byte(input int unsigned idx);
    logic [7:0] f [80];
    f = '{8'hF0,8'h90,8'h90,8'h90,8'hF0, 8'h20,8'h60,8'h20,8'h20,8'h70,
          8'hF0,8'h10,8'hF0,8'h80,8'hF0, 8'hF0,8'h10,8'hF0,8'h10,8'hF0,
          8'h90,8'h90,8'hF0,8'h10,8'h10, 8'hF0,8'h80,8'hF0,8'h10,8'hF0,
          8'hF0,8'h80,8'hF0,8'h90,8'hF0, 8'hF0,8'h10,8'h20,8'h40,8'h40,
          8'hF0,8'h90,8'hF0,8'h90,8'hF0, 8'hF0,8'h90,8'hF0,8'h10,8'hF0,
          8'hF0,8'h90,8'hF0,8'h90,8'h90, 8'hE0,8'h90,8'hE0,8'h90,8'hE0,
          8'hF0,8'h80,8'h80,8'h80,8'hF0, 8'hE0,8'h90,8'h90,8'h90,8'hE0,
          8'hF0,8'h80,8'hF0,8'h80,8'hF0, 8'hF0,8'h80,8'hF0,8'h80,8'h80};
    return (idx < 80) ? f[idx] : 8'h00;
  endfunction

endpackage
