// chip8_debug_tb: runs the debug module with a short refresh (50 cycles) and
// digit period (4 cycles) against a responder that holds ready low for a
// while (as if the processor owned the port). Checks that a read of the
// selected address and region is requested once per refresh and held until
// taken, that the returned byte is shown, and that the eight digits scan with
// one anode low at a time and the right segment patterns (address and region
// on the left, data on the right, two blank digits).
module chip8_debug_tb;
  import chip8_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [11:0] addr = 12'h2A5;
  mem_type_t   typ = MEM_STATE;
  mem_req_t    req;
  logic        ready, valid = 0;
  logic [7:0]  data = 0, shown;
  logic [6:0]  seg;
  logic [7:0]  an;
  bit          busy_port = 0;

  chip8_debug #(.REFRESH(50), .SCAN(4)) dut (
    .clk(clk), .rst(rst), .dbg_addr(addr), .dbg_type(typ), .debug_req(req),
    .debug_mem_ready(ready), .debug_mem_valid(valid), .mem_data(data),
    .shown_data(shown), .seg(seg), .an(an)
  );

  assign ready = req.valid_req && !busy_port;
  int reads = 0, bad_req = 0;
  logic [7:0] value = 8'h3C;
  always @(posedge clk) begin
    if (ready) begin
      reads++;
      if (req.we || req.addr != addr || req.mem_type != typ) bad_req++;
      fork begin
        repeat (2) @(posedge clk);
        #1 data = value; valid = 1;
        @(posedge clk); #1 valid = 0;
      end join_none
    end
  end

  int checks = 0, failures = 0;
  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0h expected %0h", what, got, exp); end
  endtask

  // segments g..a, lit = 1, for the digits 0..F
  localparam logic [6:0] SEG [16] = '{7'b0111111, 7'b0000110, 7'b1011011, 7'b1001111,
                                      7'b1100110, 7'b1101101, 7'b1111101, 7'b0000111,
                                      7'b1111111, 7'b1101111, 7'b1110111, 7'b1111100,
                                      7'b0111001, 7'b1011110, 7'b1111001, 7'b1110001};

  initial begin
    int d;
    logic [3:0] expn [8];
    logic [7:0] seen_an;
    repeat (3) @(negedge clk); rst = 0;
    busy_port = 1;
    repeat (120) @(negedge clk);
    check("no read while port busy", reads, 0);
    check("request held", int'(req.valid_req), 1);
    busy_port = 0;
    repeat (10) @(negedge clk);
    check("held request taken once", reads, 1);
    check("shown data", shown, 'h3C);
    value = 8'hE7;
    repeat (60) @(negedge clk);
    check("periodic refresh", reads, 2);
    check("new data shown", shown, 'hE7);
    check("request fields", bad_req, 0);
    expn = '{4'h7, 4'hE, 4'h0, 4'h0, 4'h5, 4'hA, 4'h2, 4'h1};   // digit 0 .. 7
    seen_an = 0;
    for (int k = 0; k < 64; k++) begin
      @(negedge clk);
      check("one anode", $countones(an), 7);
      d = 0;
      for (int i = 0; i < 8; i++) if (!an[i]) d = i;
      seen_an |= 8'(~an);
      if (d == 2 || d == 3) check("blank digit", seg, 7'h7F);
      else check($sformatf("digit %0d", d), seg, 7'(~SEG[expn[d]]));
    end
    check("all digits scanned", seen_an, 8'hFF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
