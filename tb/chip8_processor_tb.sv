// chip8_processor_tb: runs a test program on two instances of the processor
// against a behavioural two-instance memory (two-cycle read latency, random
// stalls on ready) and a behavioural video module, then checks registers,
// memory, PC, stack, timers, the video hand-off and the round structure
// against values worked out by hand from the program below.
module chip8_processor_tb;
  import chip8_pkg::*;

  localparam int NI = 2;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic tick = 0, timer_tick = 0;
  logic [15:0] keys = 16'h0002;           // key 1 held
  logic [5:0]  core_sel;
  mem_req_t    req;
  logic        ready, valid;
  logic [7:0]  rdata;
  logic        vclr, vdrw, vcoll, vdone;
  logic [11:0] vaddr; logic [5:0] vx; logic [4:0] vy; logic [3:0] vh;
  logic [NI-1:0] snd;
  logic        idone, rdone, busy;

  chip8_processor #(.NUM_INST(NI)) dut (
    .clk(clk), .rst(rst), .tick(tick), .timer_tick(timer_tick), .num_active(6'd2),
    .quirks('0), .keys_pressed(keys), .core_sel(core_sel), .proc_req(req),
    .proc_mem_ready(ready), .proc_mem_valid(valid), .mem_data(rdata),
    .video_clear_buffer(vclr), .video_draw_sprite(vdrw), .video_sprite_addr(vaddr),
    .video_sprite_x(vx), .video_sprite_y(vy), .video_sprite_height(vh),
    .video_collision(vcoll), .video_done_drawing(vdone), .sound_active(snd),
    .instr_done(idone), .round_done(rdone), .busy(busy)
  );

  // ---- behavioural memory: 2 instances, latency 2, random stalls ----
  logic [7:0] mem [NI][CORE_BYTES];
  logic       v_p [2];
  logic [7:0] d_p [2];
  always_comb ready = req.valid_req && ($urandom_range(0, 3) != 0);
  always_ff @(posedge clk) begin
    v_p[0] <= ready && !req.we;
    d_p[0] <= mem[core_sel][core_addr(req.mem_type, req.addr)];
    v_p[1] <= v_p[0];
    d_p[1] <= d_p[0];
    if (ready && req.we) mem[core_sel][core_addr(req.mem_type, req.addr)] <= req.data;
  end
  assign valid = v_p[1];
  assign rdata = d_p[1];

  // ---- behavioural video module ----
  int clears = 0, draws = 0;
  logic [11:0] last_addr; logic [5:0] last_x; logic [4:0] last_y; logic [3:0] last_h;
  initial begin vdone = 0; vcoll = 0; end
  always @(posedge clk) begin
    if (!rst && (vclr || vdrw)) begin
      if (vclr) clears++;
      if (vdrw) begin draws++; last_addr = vaddr; last_x = vx; last_y = vy; last_h = vh; end
      vcoll <= vdrw && (vh == 4'd3);
      repeat (5) @(posedge clk);
      vdone <= 1'b1;
      @(posedge clk);
      vdone <= 1'b0;
    end
  end

  // ---- program ----
  localparam logic [15:0] PROG [50] = '{
    16'h6105, 16'h62FB, 16'h8010, 16'h8024, 16'h8AF0, 16'h6307, 16'h8315, 16'h6403,
    16'h8415, 16'h8BF0, 16'h6509, 16'h8516, 16'h6681, 16'h866E, 16'h8CF0, 16'h6770,
    16'h8717, 16'h8DF0, 16'h6833, 16'h8821, 16'h8832, 16'h8813, 16'h7805, 16'h3805,
    16'h7801, 16'h380D, 16'h78F0, 16'h4800, 16'h78F0, 16'h5810, 16'h9810, 16'h78F0,
    16'h2300, 16'hA400, 16'hF933, 16'hF265, 16'hA410, 16'hF255, 16'h6E0A, 16'hFE29,
    16'hFE1E, 16'h6E05, 16'hFE15, 16'hFE18, 16'hE09E, 16'h6E77, 16'hE3A1, 16'h6E88,
    16'hF40A, 16'hB26F};                                 // 0x200 .. 0x262
  localparam logic [15:0] PROG2 [6] = '{16'hD123, 16'h8EF0, 16'h00E0, 16'hFD07, 16'hC70F,
                                       16'h127A};       // 0x270 .. 0x27A
  localparam logic [15:0] SUB [2] = '{16'h697B, 16'h00EE}; // 0x300

  int checks = 0, failures = 0, instrs = 0, rounds = 0;
  int per_core [NI];

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  function automatic int st(input int c, input logic [11:0] off);
    return int'(mem[c][RAM_BYTES + off]);
  endfunction

  always @(posedge clk) if (!rst && idone) instrs++;
  // the final PC write of an instruction tells which instance it belonged to
  always @(posedge clk)
    if (!rst && ready && req.we && req.mem_type == MEM_STATE && req.addr == ST_PC + 12'd1) per_core[core_sel]++;
  always @(posedge clk) if (!rst && rdone) rounds++;

  task automatic run_round(input bit with_timer);
    @(negedge clk); tick = 1; timer_tick = with_timer; @(negedge clk); tick = 0; timer_tick = 0;
    wait (!busy); repeat (2) @(negedge clk);
  endtask

  initial begin
    for (int c = 0; c < NI; c++) begin
      per_core[c] = 0;
      for (int a = 0; a < int'(CORE_BYTES); a++) mem[c][a] = 8'h00;
      foreach (PROG[i])  {mem[c][512 + 2*i], mem[c][513 + 2*i]} = PROG[i];
      foreach (PROG2[i]) {mem[c][624 + 2*i], mem[c][625 + 2*i]} = PROG2[i];
      foreach (SUB[i])   {mem[c][768 + 2*i], mem[c][769 + 2*i]} = SUB[i];
      mem[c][RAM_BYTES + ST_PC] = 8'h02;
    end
    repeat (4) @(negedge clk); rst = 0;
    for (int r = 0; r < 80; r++) run_round(1'b0);

    check("rounds", rounds, 80);
    check("instructions", instrs, 160);
    check("core0 steps", per_core[0], 80);
    check("core1 steps", per_core[1], 80);
    for (int c = 0; c < NI; c++) begin
      int exp_v [16] = '{1, 2, 3, 2, 1, 4, 2, -1, 'h0D, 'h7B, 1, 0, 1, 5, 1, 1};
      for (int r = 0; r < 16; r++)
        if (r != 7) check($sformatf("core%0d V%0h", c, r), st(c, ST_V + 12'(r)), exp_v[r]);
      check("V7 random masked", int'(st(c, ST_V + 12'd7) <= 'h0F), 1);
      check("PC", st(c, ST_PC) * 256 + st(c, ST_PC + 1), 'h27A);
      check("I", st(c, ST_I) * 256 + st(c, ST_I + 1), 'h03C);
      check("SP", st(c, ST_SP), 0);
      check("stack[0]", st(c, ST_STACK) * 256 + st(c, ST_STACK + 1), 'h242);
      check("BCD", {mem[c][12'h400], mem[c][12'h401], mem[c][12'h402]}, 24'h010203);
      check("FX55", {mem[c][12'h410], mem[c][12'h411], mem[c][12'h412]}, 24'h010203);
      check("DT", st(c, ST_DT), 5);
      check("ST", st(c, ST_ST), 5);
    end
    check("sound active", int'(snd), 3);
    check("draws", draws, 2);
    check("clears", clears, 2);
    check("draw addr", last_addr, 'h03C);
    check("draw x", last_x, 2);
    check("draw y", last_y, 3);
    check("draw h", last_h, 3);
    // two rounds with a timer tick: DT and ST count down
    run_round(1'b1);
    run_round(1'b1);
    for (int c = 0; c < NI; c++) begin
      check("DT after ticks", st(c, ST_DT), 3);
      check("ST after ticks", st(c, ST_ST), 3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
