// chip8_memory: the memory module. It holds one chip8_mem_core per Chip-8
// instance (NUM_INST, 36 by default) and shares their two ports out.
//
// The read-only port B of every core belongs to the video multiplexer, which
// addresses a video-buffer byte of any instance with a flat 16-bit address
// hdmi_mem_addr = instance * 256 + byte and receives hdmi_mem_data two
// clk_pixel cycles later.
//
// Port A is shared by three requesters with a fixed priority: processor first,
// then the video module, then the debug module. Each presents a mem_req_t and
// holds it until its *_ready is high (ready is combinational and high in the
// cycle the request is taken). The processor and video requests go to the core
// chosen by core_sel (the instance the processor is currently running); the
// debug request goes to the core chosen by debug_core. Reads return mem_data
// with a one-cycle *_valid exactly MEM_LATENCY (2) cycles after the cycle they
// were taken; a requester may issue one request per cycle, so reads pipeline.
// Programs: every core is loaded with ROM_FILE at build time, except the
// cores whose bit is set in ROM_ALT_MASK, which get ROM_FILE_ALT, so two
// different games can share the grid.
// The priority order and build-time loading follow the design description;
// the ready/valid timing, the flat multiplexer address and the two-file
// selection are this implementation's choices.
module chip8_memory
  import chip8_pkg::*;
#(
  parameter int unsigned NUM_INST = 36,
  parameter string       ROM_FILE = "rtl/chip8_demo_rom.hex",
  parameter string       ROM_FILE_ALT = "rtl/chip8_demo_rom.hex",
  parameter logic [63:0] ROM_ALT_MASK = 64'h0
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [5:0]  core_sel,
  input  logic [5:0]  debug_core,
  input  mem_req_t    proc_req,
  output logic        proc_mem_ready,
  output logic        proc_mem_valid,
  input  mem_req_t    video_req,
  output logic        video_mem_ready,
  output logic        video_mem_valid,
  input  mem_req_t    debug_req,
  output logic        debug_mem_ready,
  output logic        debug_mem_valid,
  output logic [7:0]  mem_data,
  input  logic        clk_pixel,
  input  logic [15:0] hdmi_mem_addr,
  output logic [7:0]  hdmi_mem_data
);

  typedef enum logic [1:0] {REQ_PROC, REQ_VIDEO, REQ_DEBUG} requester_t;

  // ---------------- port A: fixed-priority arbitration ----------------
  mem_req_t   req;
  requester_t who;
  logic       take;
  logic [5:0] tgt;

  always_comb begin
    proc_mem_ready  = 1'b0;
    video_mem_ready = 1'b0;
    debug_mem_ready = 1'b0;
    req  = '0;
    who  = REQ_PROC;
    tgt  = core_sel;
    take = 1'b0;
    if (proc_req.valid_req) begin
      req = proc_req;  who = REQ_PROC;  proc_mem_ready = 1'b1;  take = 1'b1;
    end else if (video_req.valid_req) begin
      req = video_req; who = REQ_VIDEO; video_mem_ready = 1'b1; take = 1'b1;
    end else if (debug_req.valid_req) begin
      req = debug_req; who = REQ_DEBUG; debug_mem_ready = 1'b1; take = 1'b1;
      tgt = debug_core;
    end
  end

  // Read tags travelling alongside the core's two-cycle read pipeline.
  typedef struct packed {
    logic       rd;
    requester_t who;
    logic [5:0] core;
  } tag_t;
  tag_t tag [MEM_LATENCY];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(MEM_LATENCY); i++) tag[i] <= '0;
    end else begin
      tag[0] <= '{rd: take && !req.we, who: who, core: tgt};
      for (int i = 1; i < int'(MEM_LATENCY); i++) tag[i] <= tag[i-1];
    end
  end

  logic [7:0] dout_a [NUM_INST];
  logic [7:0] dout_b [NUM_INST];

  logic [CORE_AW-1:0] addr_a;
  logic [CORE_AW-1:0] addr_b;
  assign addr_a = core_addr(req.mem_type, req.addr);
  assign addr_b = CORE_AW'(RAM_BYTES) + CORE_AW'(hdmi_mem_addr[7:0]);

  for (genvar g = 0; g < int'(NUM_INST); g++) begin : g_core
    chip8_mem_core #(.ROM_FILE(ROM_ALT_MASK[g] ? ROM_FILE_ALT : ROM_FILE)) u_core (
      .clk_a (clk),
      .we_a  (take && req.we && (tgt == 6'(g))),
      .addr_a(addr_a),
      .din_a (req.data),
      .dout_a(dout_a[g]),
      .clk_b (clk_pixel),
      .addr_b(addr_b),
      .dout_b(dout_b[g])
    );
  end

  tag_t last;
  assign last = tag[MEM_LATENCY-1];
  assign mem_data        = (int'(last.core) < int'(NUM_INST)) ? dout_a[last.core] : 8'h00;
  assign proc_mem_valid  = last.rd && (last.who == REQ_PROC);
  assign video_mem_valid = last.rd && (last.who == REQ_VIDEO);
  assign debug_mem_valid = last.rd && (last.who == REQ_DEBUG);

  // ---------------- port B: video multiplexer ----------------
  logic [5:0] inst_b [MEM_LATENCY];
  always_ff @(posedge clk_pixel) begin
    inst_b[0] <= hdmi_mem_addr[13:8];
    for (int i = 1; i < int'(MEM_LATENCY); i++) inst_b[i] <= inst_b[i-1];
  end
  assign hdmi_mem_data = (int'(inst_b[MEM_LATENCY-1]) < int'(NUM_INST)) ?
                         dout_b[inst_b[MEM_LATENCY-1]] : 8'h00;

  // Handshake rules: a request that was not taken stays presented unchanged,
  // and at most one read result is returned per cycle.
  property p_hold(mem_req_t r, logic rdy);
    @(posedge clk) disable iff (rst) (r.valid_req && !rdy) |=> (r.valid_req && $stable(r));
  endproperty
  a_proc_hold:  assert property (p_hold(proc_req, proc_mem_ready));
  a_video_hold: assert property (p_hold(video_req, video_mem_ready));
  a_debug_hold: assert property (p_hold(debug_req, debug_mem_ready));
  a_one_valid:  assert property (@(posedge clk) disable iff (rst)
                                 $onehot0({proc_mem_valid, video_mem_valid, debug_mem_valid}));

endmodule
