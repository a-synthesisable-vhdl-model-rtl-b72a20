// Cache test with four lines and 2-bit ages (so that ages saturate and tie
// quickly). A directed sequence checks: read miss and hit replies with the
// stored state, pointers and data; update of an existing line; a write to an
// address already present reusing its line; `flush_req` exactly when every
// line is in use; the flush reply naming the least recently used line, with
// the lowest index winning a tie of saturated ages; wipe clearing a line so
// the next write reuses it; every reply one cycle after its request.
module tb_cache;
  import sci_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        req_valid, rsp_valid, flush_req;
  cache_ctrl_t ctrl;
  cache_pkt_t  req_pkt, rsp_pkt;

  cache #(.LINES(4), .AGE_BITS(2)) dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic op(cache_ctrl_t c, logic flag, logic [7:0] a, cstate_t s, int f, int b,
                    logic [31:0] d, output cache_pkt_t r);
    ctrl      = c;
    req_pkt   = '{flag: flag, addr: a, state: s, forw: 2'(f), back: 2'(b), data: d};
    req_valid = 1;
    @(posedge clk);
    #1 req_valid = 0;
    check(rsp_valid, "reply one cycle after request");
    r = rsp_pkt;
    @(posedge clk);
    #1;
  endtask

  task automatic rd(logic [7:0] a, output cache_pkt_t r);
    op(CC_RW, 0, a, CS_UNUSED, 0, 0, 0, r);
  endtask
  task automatic wr(logic [7:0] a, cstate_t s, int f, int b, logic [31:0] d);
    cache_pkt_t r;
    op(CC_RW, 1, a, s, f, b, d, r);
  endtask

  initial begin
    cache_pkt_t r;
    req_valid = 0; ctrl = CC_RW; req_pkt = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    rd(8'h10, r);
    check(!r.flag, "empty cache misses");
    check(!flush_req, "empty cache needs no flush");
    wr(8'h10, CS_HOEL, 0, 0, 32'd100);
    wr(8'h20, CS_HOL, 1, 0, 32'd200);
    wr(8'h30, CS_TLE, 0, 2, 32'd300);
    rd(8'h10, r);
    check(r.flag && r.state == CS_HOEL && r.data == 100, "hit on $10");
    op(CC_UPDATE, 1, 8'h20, CS_RLE, 2, 3, 32'd222, r);
    check(r.flag, "update hit");
    rd(8'h20, r);
    check(r.flag && r.state == CS_RLE && r.forw == 2 && r.back == 3 && r.data == 222,
          $sformatf("updated $20: %p", r));
    rd(8'h30, r);
    check(r.flag && r.state == CS_TLE && r.back == 2 && r.data == 300, "hit on $30");
    check(!flush_req, "three of four lines used");
    // ages now: $10:2 $20:1 $30:0
    wr(8'h40, CS_HOEL, 0, 0, 32'd400);          // $10:3 $20:2 $30:1 $40:0
    check(flush_req, "full cache asks for a flush");
    op(CC_FLUSH, 0, 8'h00, CS_UNUSED, 0, 0, 0, r);
    check(r.flag && r.addr == 8'h10 && r.data == 100, $sformatf("LRU is $10, got %h", r.addr));
    rd(8'h20, r);                                 // $10:3 $20:0 $30:2 $40:1
    rd(8'h77, r);                                 // miss: $10:3 $20:1 $30:3 $40:2
    check(!r.flag, "miss on $77");
    op(CC_FLUSH, 0, 8'h00, CS_UNUSED, 0, 0, 0, r);
    check(r.addr == 8'h10, $sformatf("tie of saturated ages goes to lowest index: %h", r.addr));
    op(CC_WIPE, 0, 8'h10, CS_UNUSED, 0, 0, 0, r);
    check(r.flag && !flush_req, "wipe frees a line");
    rd(8'h10, r);
    check(!r.flag, "wiped line misses");
    wr(8'h50, CS_HOL, 3, 0, 32'd500);             // goes to the freed line
    check(flush_req, "full again");
    rd(8'h50, r);
    check(r.flag && r.data == 500 && r.forw == 3, "hit on $50");
    wr(8'h30, CS_HOEL, 0, 0, 32'd333);            // rewrite of a present address
    rd(8'h30, r);
    check(r.flag && r.state == CS_HOEL && r.data == 333, "rewrite kept one line");
    op(CC_WIPE, 0, 8'h30, CS_UNUSED, 0, 0, 0, r);
    rd(8'h30, r);
    check(!r.flag, "no duplicate line left for $30");
    op(CC_WIPE, 0, 8'h99, CS_UNUSED, 0, 0, 0, r);
    check(!r.flag, "wipe of absent address reports miss");
    // LRU with distinct ages: $20, $40, $50 present, $20 touched last.
    wr(8'h60, CS_HOEL, 0, 0, 32'd600);
    rd(8'h20, r);
    rd(8'h50, r);
    rd(8'h60, r);
    op(CC_FLUSH, 0, 8'h00, CS_UNUSED, 0, 0, 0, r);
    check(r.addr == 8'h40, $sformatf("LRU is $40, got %h", r.addr));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
