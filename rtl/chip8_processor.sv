// chip8_processor: a sequential, state-machine Chip-8 processor that runs all
// active instances in turn ("threaded" multiplexing).
//
// The processor keeps no architectural state of its own: PC, I, SP, V0..VF,
// the stack and both timers live in each instance's memory core, so switching
// to another instance is only a change of core_sel. It idles until a tick
// (the emulated instruction clock, 500 Hz by default, from chip8_tick_gen),
// then for core_sel = 0 .. num_active-1 executes exactly one instruction of
// that instance, and returns to idle.
//
// One instruction is:
//   LOAD   12 pipelined reads from the memory port: PC (2 bytes), the opcode
//          (2 bytes at PC), VX, VY, V0, I (2 bytes), SP, DT and ST. The opcode
//          reads wait for PC, the operand reads wait for the opcode; within a
//          group a read is issued every cycle.
//   EXEC   decode. CLS and DXYN are handed to the video module (pulse, then
//          wait for video_done_drawing); 00EE reads the return address from the
//          stack; FX55/FX65 copy registers one byte at a time.
//   WRITE  a list of up to 8 byte writes computed from the decoded instruction:
//          results (VX before VF), I, SP and stack, BCD digits, the timers and
//          finally the new PC.
// Timers: a timer_tick (60 Hz) is remembered until the next round; in that
// round each instance's DT and ST are decremented (if nonzero) as part of its
// instruction. sound_active[i] is high while instance i's ST is nonzero.
// The random number source for CXNN is one free-running 16-bit LFSR shared by
// all instances, so identical programs diverge. FX0A, with no key down, leaves
// PC unchanged so the instruction repeats; with keys down it takes the lowest.
// Behaviour choices for ambiguous instructions follow the quirks input.
// The sequential structure, the PC held in memory, the video hand-off and the
// multiplexed schedule follow the design description; the load/write-list
// organisation, the 60 Hz timer handling and FX0A behaviour are this
// implementation's own.
//
// Handshakes: proc_req is held until proc_mem_ready; read data arrives with
// proc_mem_valid (in request order). The video pulses last one cycle.
module chip8_processor
  import chip8_pkg::*;
#(
  parameter int unsigned NUM_INST = 36
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                tick,          // start one round (pulse)
  input  logic                timer_tick,    // 60 Hz timer decrement request (pulse)
  input  logic [5:0]          num_active,    // instances to run, 1..NUM_INST
  input  quirks_t             quirks,
  input  logic [15:0]         keys_pressed,
  output logic [5:0]          core_sel,
  output mem_req_t            proc_req,
  input  logic                proc_mem_ready,
  input  logic                proc_mem_valid,
  input  logic [7:0]          mem_data,
  output logic                video_clear_buffer,
  output logic                video_draw_sprite,
  output logic [11:0]         video_sprite_addr,
  output logic [5:0]          video_sprite_x,
  output logic [4:0]          video_sprite_y,
  output logic [3:0]          video_sprite_height,
  input  logic                video_collision,
  input  logic                video_done_drawing,
  output logic [NUM_INST-1:0] sound_active,
  output logic                instr_done,    // pulse: one instruction retired
  output logic                round_done,    // pulse: all active instances stepped
  output logic                busy
);

  typedef enum logic [3:0] {
    P_IDLE, P_LOAD, P_EXEC, P_CLS, P_DRW, P_VWAIT, P_RET, P_CPY_RD, P_CPY_WAIT,
    P_CPY_WR, P_WRITE
  } pstate_t;

  localparam int unsigned LOADS = 12;
  localparam int unsigned WMAX  = 8;

  pstate_t     state;
  logic        tick_pend, tmr_pend, tmr;
  logic [3:0]  iss, rcv;                 // load/aux read issue and receive counters
  logic [7:0]  ld [LOADS];               // loaded bytes
  logic [7:0]  ret_h, ret_l;             // return address read by 00EE
  logic [4:0]  cpy;                      // FX55/FX65 byte counter
  logic [7:0]  cpy_data;
  logic        coll;
  logic [2:0]  wi;
  logic [15:0] lfsr;

  // ---------------- decoded fields ----------------
  logic [11:0] pc, ireg, nnn;
  logic [15:0] op;
  logic [3:0]  x, y, n;
  logic [7:0]  nn, vx, vy, v0, sp, dt, st, dt_eff, st_eff;

  assign pc   = {ld[0][3:0], ld[1]};
  assign op   = {ld[2], ld[3]};
  assign vx   = ld[4];
  assign vy   = ld[5];
  assign v0   = ld[6];
  assign ireg = {ld[7][3:0], ld[8]};
  assign sp   = ld[9];
  assign dt   = ld[10];
  assign st   = ld[11];
  assign nnn  = op[11:0];
  assign nn   = op[7:0];
  assign n    = op[3:0];
  assign x    = op[11:8];
  assign y    = op[7:4];
  assign dt_eff = (tmr && dt != 8'd0) ? dt - 8'd1 : dt;
  assign st_eff = (tmr && st != 8'd0) ? st - 8'd1 : st;

  // Address of load number k.
  function automatic mem_req_t load_req(input logic [3:0] k, input logic [11:0] p,
                                        input logic [3:0] rx, input logic [3:0] ry);
    mem_req_t r;
    r = '{valid_req: 1'b1, we: 1'b0, mem_type: MEM_STATE, addr: 12'd0, data: 8'd0};
    unique case (k)
      4'd0:  r.addr = ST_PC;
      4'd1:  r.addr = ST_PC + 12'd1;
      4'd2:  begin r.mem_type = MEM_RAM; r.addr = p; end
      4'd3:  begin r.mem_type = MEM_RAM; r.addr = p + 12'd1; end
      4'd4:  r.addr = ST_V + 12'(rx);
      4'd5:  r.addr = ST_V + 12'(ry);
      4'd6:  r.addr = ST_V;
      4'd7:  r.addr = ST_I;
      4'd8:  r.addr = ST_I + 12'd1;
      4'd9:  r.addr = ST_SP;
      4'd10: r.addr = ST_DT;
      default: r.addr = ST_ST;
    endcase
    return r;
  endfunction

  // A load may be issued once the bytes its address depends on have arrived.
  logic load_ok;
  always_comb begin
    if (iss < 4'd2)      load_ok = 1'b1;
    else if (iss < 4'd4) load_ok = (rcv >= 4'd2);
    else                 load_ok = (rcv >= 4'd4);
  end

  // Lowest pressed key for FX0A.
  logic [3:0] key_low;
  always_comb begin
    key_low = 4'd0;
    for (int k = 15; k >= 0; k--) if (keys_pressed[k]) key_low = 4'(k);
  end

  // ---------------- write list ----------------
  mem_req_t    wl [WMAX];
  logic [3:0]  wcnt;
  logic [11:0] pc_next;
  logic [7:0]  st_final;

  always_comb begin
    logic [8:0]  sum;
    logic [7:0]  src, res, vf;
    logic        wr_vx, wr_vf, wr_dt, wr_st, wr_i;
    logic [7:0]  dt_new, st_new;
    logic [11:0] i_new;
    logic [2:0]  k;
    for (int j = 0; j < int'(WMAX); j++) wl[j] = '0;
    k       = '0;
    sum     = '0;
    src     = quirks.shift_vy ? vy : vx;
    res     = vx;
    vf      = 8'd0;
    wr_vx   = 1'b0;
    wr_vf   = 1'b0;
    wr_i    = 1'b0;
    i_new   = ireg;
    dt_new  = dt_eff;
    st_new  = st_eff;
    wr_dt   = tmr;
    wr_st   = tmr;
    pc_next = pc + 12'd2;

    unique case (op[15:12])
      4'h0: if (op == 16'h00EE) begin
              pc_next = {ret_h[3:0], ret_l};
              wl[k] = '{1'b1, 1'b1, MEM_STATE, ST_SP, sp - 8'd1}; k++;
            end
      4'h1: pc_next = nnn;
      4'h2: begin
              wl[k] = '{1'b1, 1'b1, MEM_STATE, ST_STACK + 12'({sp[3:0], 1'b0}),
                        {4'd0, pc_next[11:8]}}; k++;
              wl[k] = '{1'b1, 1'b1, MEM_STATE, ST_STACK + 12'({sp[3:0], 1'b1}),
                        pc_next[7:0]}; k++;
              wl[k] = '{1'b1, 1'b1, MEM_STATE, ST_SP, 8'({sp[3:0] + 4'd1})}; k++;
              pc_next = nnn;
            end
      4'h3: if (vx == nn) pc_next = pc + 12'd4;
      4'h4: if (vx != nn) pc_next = pc + 12'd4;
      4'h5: if (vx == vy) pc_next = pc + 12'd4;
      4'h6: begin res = nn; wr_vx = 1'b1; end
      4'h7: begin res = vx + nn; wr_vx = 1'b1; end
      4'h8: begin
              wr_vx = 1'b1;
              unique case (n)
                4'h0: res = vy;
                4'h1: begin res = vx | vy; wr_vf = quirks.vf_reset; end
                4'h2: begin res = vx & vy; wr_vf = quirks.vf_reset; end
                4'h3: begin res = vx ^ vy; wr_vf = quirks.vf_reset; end
                4'h4: begin sum = 9'(vx) + 9'(vy); res = sum[7:0]; vf = 8'(sum[8]); wr_vf = 1'b1; end
                4'h5: begin res = vx - vy; vf = 8'(vx >= vy); wr_vf = 1'b1; end
                4'h6: begin res = src >> 1; vf = 8'(src[0]); wr_vf = 1'b1; end
                4'h7: begin res = vy - vx; vf = 8'(vy >= vx); wr_vf = 1'b1; end
                4'hE: begin res = src << 1; vf = 8'(src[7]); wr_vf = 1'b1; end
                default: wr_vx = 1'b0;
              endcase
            end
      4'h9: if (vx != vy) pc_next = pc + 12'd4;
      4'hA: begin i_new = nnn; wr_i = 1'b1; end
      4'hB: pc_next = nnn + 12'(quirks.jump_vx ? vx : v0);
      4'hC: begin res = lfsr[7:0] & nn; wr_vx = 1'b1; end
      4'hD: begin vf = 8'(coll); wr_vf = 1'b1; end
      4'hE: begin
              if (nn == 8'h9E &&  keys_pressed[vx[3:0]]) pc_next = pc + 12'd4;
              if (nn == 8'hA1 && !keys_pressed[vx[3:0]]) pc_next = pc + 12'd4;
            end
      4'hF: unique case (nn)
              8'h07: begin res = dt_eff; wr_vx = 1'b1; end
              8'h0A: if (keys_pressed != 16'd0) begin res = 8'(key_low); wr_vx = 1'b1; end
                     else pc_next = pc;
              8'h15: begin dt_new = vx; wr_dt = 1'b1; end
              8'h18: begin st_new = vx; wr_st = 1'b1; end
              8'h1E: begin i_new = ireg + 12'(vx); wr_i = 1'b1; end
              8'h29: begin i_new = FONT_START + 12'(vx[3:0]) * 12'd5; wr_i = 1'b1; end
              8'h33: begin
                       wl[k] = '{1'b1, 1'b1, MEM_RAM, ireg,         vx / 8'd100};       k++;
                       wl[k] = '{1'b1, 1'b1, MEM_RAM, ireg + 12'd1, (vx / 8'd10) % 8'd10}; k++;
                       wl[k] = '{1'b1, 1'b1, MEM_RAM, ireg + 12'd2, vx % 8'd10};        k++;
                     end
              8'h55, 8'h65: if (quirks.mem_inc_i) begin
                       i_new = ireg + 12'(x) + 12'd1; wr_i = 1'b1;
                     end
              default: ;
            endcase
      default: ;
    endcase

    if (wr_vx) begin wl[k] = '{1'b1, 1'b1, MEM_STATE, ST_V + 12'(x), res}; k++; end
    if (wr_vf) begin wl[k] = '{1'b1, 1'b1, MEM_STATE, ST_V + 12'hF,  vf};  k++; end
    if (wr_i) begin
      wl[k] = '{1'b1, 1'b1, MEM_STATE, ST_I,         {4'd0, i_new[11:8]}}; k++;
      wl[k] = '{1'b1, 1'b1, MEM_STATE, ST_I + 12'd1, i_new[7:0]};          k++;
    end
    if (wr_dt) begin wl[k] = '{1'b1, 1'b1, MEM_STATE, ST_DT, dt_new}; k++; end
    if (wr_st) begin wl[k] = '{1'b1, 1'b1, MEM_STATE, ST_ST, st_new}; k++; end
    // Remaining room always holds the PC (at most 6 entries precede it).
    wl[k]        = '{1'b1, 1'b1, MEM_STATE, ST_PC,         {4'd0, pc_next[11:8]}};
    wl[k + 3'd1] = '{1'b1, 1'b1, MEM_STATE, ST_PC + 12'd1, pc_next[7:0]};
    wcnt     = 4'(k) + 4'd2;
    st_final = st_new;
  end

  // ---------------- request driver ----------------
  always_comb begin
    proc_req = '0;
    unique case (state)
      P_LOAD:  if (iss < 4'(LOADS) && load_ok) proc_req = load_req(iss, pc, x, y);
      P_RET:   if (iss < 4'd2)
                 proc_req = '{1'b1, 1'b0, MEM_STATE,
                              ST_STACK + 12'({sp[3:0] - 4'd1, iss[0]}), 8'd0};
      P_CPY_RD: proc_req = (op[7:0] == 8'h55)
                 ? '{1'b1, 1'b0, MEM_STATE, ST_V + 12'(cpy), 8'd0}
                 : '{1'b1, 1'b0, MEM_RAM, ireg + 12'(cpy), 8'd0};
      P_CPY_WR: proc_req = (op[7:0] == 8'h55)
                 ? '{1'b1, 1'b1, MEM_RAM, ireg + 12'(cpy), cpy_data}
                 : '{1'b1, 1'b1, MEM_STATE, ST_V + 12'(cpy), cpy_data};
      P_WRITE: proc_req = wl[wi];
      default: ;
    endcase
  end

  assign video_sprite_addr   = ireg;
  assign video_sprite_x      = vx[5:0];
  assign video_sprite_y      = vy[4:0];
  assign video_sprite_height = n;
  assign busy                = (state != P_IDLE);

  // ---------------- state machine ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= P_IDLE;
      tick_pend    <= 1'b0;
      tmr_pend     <= 1'b0;
      tmr          <= 1'b0;
      core_sel     <= '0;
      iss          <= '0;
      rcv          <= '0;
      cpy          <= '0;
      cpy_data     <= '0;
      wi           <= '0;
      coll         <= 1'b0;
      ret_h        <= '0;
      ret_l        <= '0;
      lfsr         <= 16'hACE1;
      sound_active <= '0;
      instr_done   <= 1'b0;
      round_done   <= 1'b0;
      video_clear_buffer <= 1'b0;
      video_draw_sprite  <= 1'b0;
      for (int j = 0; j < int'(LOADS); j++) ld[j] <= '0;
    end else begin
      lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
      instr_done         <= 1'b0;
      round_done         <= 1'b0;
      video_clear_buffer <= 1'b0;
      video_draw_sprite  <= 1'b0;
      if (tick)       tick_pend <= 1'b1;
      if (timer_tick) tmr_pend  <= 1'b1;

      unique case (state)
        P_IDLE: if (tick || tick_pend) begin
          tick_pend <= 1'b0;
          tmr       <= tmr_pend || timer_tick;
          tmr_pend  <= 1'b0;
          core_sel  <= '0;
          iss       <= '0;
          rcv       <= '0;
          state     <= P_LOAD;
        end
        P_LOAD: begin
          if (proc_req.valid_req && proc_mem_ready) iss <= iss + 4'd1;
          if (proc_mem_valid) begin
            ld[rcv] <= mem_data;
            rcv     <= rcv + 4'd1;
            if (rcv == 4'(LOADS - 1)) state <= P_EXEC;
          end
        end
        P_EXEC: begin
          wi  <= '0;
          iss <= '0;
          rcv <= '0;
          cpy <= '0;
          if (op == 16'h00E0)            state <= P_CLS;
          else if (op[15:12] == 4'hD)    state <= P_DRW;
          else if (op == 16'h00EE)       state <= P_RET;
          else if (op[15:12] == 4'hF && (nn == 8'h55 || nn == 8'h65)) state <= P_CPY_RD;
          else                           state <= P_WRITE;
        end
        P_CLS: begin
          video_clear_buffer <= 1'b1;
          state              <= P_VWAIT;
        end
        P_DRW: begin
          video_draw_sprite <= 1'b1;
          state             <= P_VWAIT;
        end
        P_VWAIT: if (video_done_drawing) begin
          coll  <= video_collision;
          state <= P_WRITE;
        end
        P_RET: begin
          if (proc_req.valid_req && proc_mem_ready) iss <= iss + 4'd1;
          if (proc_mem_valid) begin
            rcv <= rcv + 4'd1;
            if (rcv == 4'd0) ret_h <= mem_data;
            else begin
              ret_l <= mem_data;
              state <= P_WRITE;
            end
          end
        end
        P_CPY_RD: if (proc_mem_ready) state <= P_CPY_WAIT;
        P_CPY_WAIT: if (proc_mem_valid) begin
          cpy_data <= mem_data;
          state    <= P_CPY_WR;
        end
        P_CPY_WR: if (proc_mem_ready) begin
          cpy <= cpy + 5'd1;
          state <= (cpy[3:0] == x) ? P_WRITE : P_CPY_RD;
        end
        P_WRITE: if (proc_mem_ready) begin
          wi <= wi + 3'd1;
          if (4'(wi) == wcnt - 4'd1) begin
            sound_active[core_sel] <= (st_final != 8'd0);
            instr_done <= 1'b1;
            iss <= '0;
            rcv <= '0;
            if (core_sel + 6'd1 >= num_active || core_sel + 6'd1 >= 6'(NUM_INST)) begin
              round_done <= 1'b1;
              state      <= P_IDLE;
            end else begin
              core_sel <= core_sel + 6'd1;
              state    <= P_LOAD;
            end
          end
        end
        default: state <= P_IDLE;
      endcase
    end
  end

endmodule
