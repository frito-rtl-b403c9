// chip8_debug: the debug module. It shows one memory byte of one instance on
// the board's eight-digit seven-segment display, reading it through the
// lowest-priority requester slot of the memory port.
//
// Every REFRESH cycles it issues one read of (dbg_type, dbg_addr) on the core
// chosen by the memory's debug_core input, holding the request until it is
// taken (it waits while the processor or video module use the port), and keeps
// the returned byte. The display shows the region (0 program memory, 1 state
// area) and the 12-bit address on the four left digits, blanks the next two,
// and the data byte on the two right digits. Digits are time-multiplexed, one
// every SCAN cycles; seg[6:0] = {g,f,e,d,c,b,a} and an[7:0] are active low.
// The debug reader only reads: debug_req.we and debug_req.data are constant
// zero, and the request's type and address are the dbg_type/dbg_addr inputs.
// The module's role and its place in the memory priority follow the design
// description; what it displays and how are this implementation's choices.
module chip8_debug
  import chip8_pkg::*;
#(
  parameter int unsigned REFRESH = 1_000_000,
  parameter int unsigned SCAN    = 100_000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [11:0] dbg_addr,
  input  mem_type_t   dbg_type,
  output mem_req_t    debug_req,
  input  logic        debug_mem_ready,
  input  logic        debug_mem_valid,
  input  logic [7:0]  mem_data,
  output logic [7:0]  shown_data,
  output logic [6:0]  seg,
  output logic [7:0]  an
);

  logic [$clog2(REFRESH+1)-1:0] rcnt;
  logic [$clog2(SCAN+1)-1:0]    scnt;
  logic                         pending;
  logic [2:0]                   digit;

  assign debug_req = '{valid_req: pending, we: 1'b0, mem_type: dbg_type,
                       addr: dbg_addr, data: 8'd0};

  always_ff @(posedge clk) begin
    if (rst) begin
      rcnt       <= '0;
      scnt       <= '0;
      pending    <= 1'b0;
      digit      <= '0;
      shown_data <= '0;
    end else begin
      if (int'(rcnt) + 1 >= int'(REFRESH)) begin
        rcnt    <= '0;
        pending <= 1'b1;
      end else begin
        rcnt <= rcnt + 1'b1;
      end
      if (pending && debug_mem_ready) pending <= 1'b0;
      if (debug_mem_valid) shown_data <= mem_data;
      if (int'(scnt) + 1 >= int'(SCAN)) begin
        scnt  <= '0;
        digit <= digit + 3'd1;
      end else begin
        scnt <= scnt + 1'b1;
      end
    end
  end

  function automatic logic [6:0] hex7(input logic [3:0] h);   // active-high gfedcba
    unique case (h)
      4'h0: return 7'h3F; 4'h1: return 7'h06; 4'h2: return 7'h5B; 4'h3: return 7'h4F;
      4'h4: return 7'h66; 4'h5: return 7'h6D; 4'h6: return 7'h7D; 4'h7: return 7'h07;
      4'h8: return 7'h7F; 4'h9: return 7'h6F; 4'hA: return 7'h77; 4'hB: return 7'h7C;
      4'hC: return 7'h39; 4'hD: return 7'h5E; 4'hE: return 7'h79; default: return 7'h71;
    endcase
  endfunction

  logic [3:0] nib;
  logic       blank;
  always_comb begin
    blank = 1'b0;
    unique case (digit)
      3'd7: nib = {3'd0, dbg_type};
      3'd6: nib = dbg_addr[11:8];
      3'd5: nib = dbg_addr[7:4];
      3'd4: nib = dbg_addr[3:0];
      3'd1: nib = shown_data[7:4];
      3'd0: nib = shown_data[3:0];
      default: begin nib = 4'd0; blank = 1'b1; end
    endcase
    seg = blank ? 7'h7F : ~hex7(nib);
    an  = ~(8'd1 << digit);
  end

endmodule
