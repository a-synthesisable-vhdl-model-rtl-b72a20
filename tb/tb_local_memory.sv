// Local memory test (node C, base address $80): untouched words read back
// their global address and not-shared; a read or write returns the old
// directory and makes the requester the list head; a flush stores the data,
// clears the directory and replies with the new data; replies come one
// cycle after the request.
module tb_local_memory;
  import sci_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic      req_valid, rsp_valid;
  mem_ctrl_t ctrl;
  mem_req_t  req_pkt;
  mem_rsp_t  rsp_pkt;

  local_memory #(.NODE_ID(2'd2)) dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic op(mem_ctrl_t c, int a, int n, logic [31:0] d, output mem_rsp_t r);
    ctrl = c;
    req_pkt = '{addr: 6'(a), node_id: 2'(n), data: d};
    req_valid = 1;
    @(posedge clk);
    #1 req_valid = 0;
    check(rsp_valid, "reply after one cycle");
    r = rsp_pkt;
    @(posedge clk);
    #1;
  endtask

  initial begin
    mem_rsp_t r;
    req_valid = 0; ctrl = MC_READ; req_pkt = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int a = 0; a < 64; a += 7) begin
      op(MC_READ, a, 1, 0, r);
      check(r.state == MS_NOT_SHARED && r.data == 32'(128 + a) && r.addr == 6'(a),
            $sformatf("first read of %0d: %p", a, r));
    end
    op(MC_READ, 7, 3, 0, r);
    check(r.state == MS_SHARED && r.forw == 1, "second read sees head B");
    op(MC_WRITE, 7, 0, 32'hFFFF, r);
    check(r.state == MS_SHARED && r.forw == 3 && r.data == 32'(128 + 7), "write sees head D, data unchanged");
    op(MC_READ, 7, 2, 0, r);
    check(r.forw == 0, "write made A the head");
    op(MC_FLUSH, 7, 0, 32'hCAFE_0007, r);
    check(r.state == MS_NOT_SHARED && r.data == 32'hCAFE_0007, "flush reply");
    op(MC_READ, 7, 1, 0, r);
    check(r.state == MS_NOT_SHARED && r.forw == 0 && r.data == 32'hCAFE_0007, "flushed word");
    op(MC_WRITE, 62, 2, 0, r);
    check(r.state == MS_NOT_SHARED && r.data == 32'(128 + 62), "write to fresh word");
    op(MC_READ, 62, 0, 0, r);
    check(r.state == MS_SHARED && r.forw == 2, "write on fresh word made C head");
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
