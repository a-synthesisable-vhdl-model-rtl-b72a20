// CPU test. Two CPUs run against a model decoder that answers each request
// after a random delay: node B in script mode and node C in random mode.
// Checked: the scripted requests (address, R/W, data) in order; the random
// addresses follow the xor/shift sequence from the seed, masked, with the
// read/write choice and write data derived as documented in the CPU; a reply
// with the wrong address is ignored; `rq` drops after each completion and
// comes back only after `go` was removed; `finished` after N_TRANS.
module tb_cpu;
  import sci_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic     go [2];
  logic     rq [2], req_valid [2], rsp_valid [2], done_valid [2], finished [2];
  cpu_pkt_t req_pkt [2], rsp_pkt [2], done_pkt [2];

  cpu #(.NODE_ID(2'd1), .MODE(0)) u_script (
    .clk, .rst, .go(go[0]), .rq(rq[0]), .req_valid(req_valid[0]), .req_pkt(req_pkt[0]),
    .rsp_valid(rsp_valid[0]), .rsp_pkt(rsp_pkt[0]), .done_valid(done_valid[0]),
    .done_pkt(done_pkt[0]), .finished(finished[0]));

  cpu #(.NODE_ID(2'd2), .MODE(1), .N_TRANS(10), .SEED(8'h3C), .ADDR_MASK(8'hF3)) u_rand (
    .clk, .rst, .go(go[1]), .rq(rq[1]), .req_valid(req_valid[1]), .req_pkt(req_pkt[1]),
    .rsp_valid(rsp_valid[1]), .rsp_pkt(rsp_pkt[1]), .done_valid(done_valid[1]),
    .done_pkt(done_pkt[1]), .finished(finished[1]));

  function automatic logic [7:0] step(logic [7:0] x);
    logic [7:0] a = x ^ (x >> 3);
    return a ^ (a << 5);
  endfunction

  // Expected scripted request idx of node B.
  function automatic cpu_pkt_t script_b(int idx);
    logic [7:0] tbl [7] = '{8'h11, 8'h22, 8'h44, 8'h88, 8'hAA, 8'h11, 8'h88};
    return '{rw: idx == 6, addr: tbl[idx], data: (idx == 6) ? 32'h8 : 32'h0};
  endfunction

  task automatic run(int k, int n, logic [7:0] seed, logic [7:0] mask);
    logic [7:0] s = seed;
    for (int i = 0; i < n; i++) begin
      cpu_pkt_t q;
      check(rq[k], $sformatf("cpu %0d requests before txn %0d", k, i));
      go[k] = 1;
      do @(posedge clk); while (!req_valid[k]);
      #1;
      q = req_pkt[k];
      if (k == 0) begin
        check(q == script_b(i), $sformatf("script txn %0d: %h", i, q));
      end else begin
        s = step(s);
        check(q.addr == (s & mask), $sformatf("random txn %0d addr %h expected %h", i, q.addr, s & mask));
        check(q.rw == (s[3] ^ s[6]), $sformatf("random txn %0d direction", i));
        if (q.rw)
          check(q.data == {6'h0, 2'd2, 8'(i), 8'hA5, q.addr}, $sformatf("random txn %0d data %h", i, q.data));
      end
      repeat ($urandom_range(1, 6)) @(posedge clk);
      #1;
      // a reply for another address first: must be ignored
      rsp_pkt[k] = '{rw: q.rw, addr: q.addr ^ 8'h01, data: 32'hDEAD};
      rsp_valid[k] = 1;
      @(posedge clk);
      #1 rsp_valid[k] = 0;
      repeat (2) @(posedge clk);
      #1 check(rq[k], "wrong-address reply ignored");
      rsp_pkt[k] = '{rw: q.rw, addr: q.addr, data: 32'(1000 + i)};
      rsp_valid[k] = 1;
      @(posedge clk);
      #1 rsp_valid[k] = 0;
      check(done_valid[k] && done_pkt[k].data == 32'(1000 + i) && done_pkt[k].addr == q.addr,
               $sformatf("cpu %0d completion %0d", k, i));
      check(!rq[k], "rq dropped after completion");
      repeat (2) @(posedge clk);
      #1 check(!rq[k], "rq stays low while go is held");
      go[k] = 0;
      repeat (2) @(posedge clk);
      #1;
    end
    check(finished[k] && !rq[k], $sformatf("cpu %0d finished", k));
  endtask

  initial begin
    go = '{0, 0};
    rsp_valid = '{0, 0};
    rsp_pkt = '{default: '0};
    repeat (2) @(posedge clk);
    rst = 0;
    @(posedge clk);
    run(0, 7, 8'h0, 8'hFF);
    run(1, 10, 8'h3C, 8'hF3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
