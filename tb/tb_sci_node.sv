// Single-node test: node A at full size runs its seven-transaction script
// while the testbench stands in for nodes B, C and D on the ring. Remote
// reads (transaction 1) are answered with return-data (3) whose data equals
// the address, which is also what the real home memories hold after reset.
// Checks: each CPU completion carries the expected data in script order;
// only the granted CPU moves; the re-read of $11 is a cache hit with no
// ring traffic; a packet for another node passes through with one cycle of
// delay and a bypass event; a remote read of $11 from D (A is home and
// holds the only copy) is answered with the data; the write leaves no
// protocol error.
module tb_sci_node;
  import sci_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic      go, rq, ring_in_valid, ring_out_valid, done_valid, finished;
  ring_pkt_t ring_in, ring_out;
  cpu_pkt_t  done_pkt;
  logic      ev_hit, ev_flush, ev_bypass, ev_inject_stall, ev_recirculate, proto_err;

  sci_node #(.NODE_ID(2'd0)) dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  ring_pkt_t rsp_q[$];
  ring_pkt_t seen_q[$];
  int        n_done = 0, n_hits = 0, n_bypass = 0, n_sent = 0;
  bit        go_en = 1;
  logic [31:0] exp_data [7] = '{32'h11, 32'h22, 32'h44, 32'h88, 32'hAA, 32'h11, 32'h4};

  assign go = rq && go_en;

  // Other nodes: answer remote reads, record everything else.
  always @(posedge clk) if (!rst) begin
    if (ring_out_valid) begin
      n_sent++;
      if (ring_out.trans == T_REMOTE_READ && ring_out.dest != 2'd0)
        rsp_q.push_back('{dest: 2'd0, trans: T_RETURN_DATA, src: ring_out.dest,
                          addr: ring_out.addr, data: 32'(ring_out.addr)});
      else seen_q.push_back(ring_out);
    end
    if (done_valid) begin
      check(n_done < 7 && done_pkt.data == exp_data[n_done] &&
            done_pkt.addr == demo_txn(2'd0, n_done).addr,
            $sformatf("completion %0d: %p", n_done, done_pkt));
      n_done++;
    end
    if (ev_hit) n_hits++;
    if (ev_bypass) n_bypass++;
  end

  task automatic drive(ring_pkt_t p);
    ring_in = p;
    ring_in_valid = 1;
    @(posedge clk);
    #1 ring_in_valid = 0;
  endtask

  initial begin
    int sent_before, w;
    ring_in_valid = 0; ring_in = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // stall the grant for a while: nothing may happen
    go_en = 0;
    repeat (10) @(posedge clk);
    #1 check(n_done == 0 && n_sent == 0, "no activity without grant");
    check(rq, "CPU requests the grant");
    go_en = 1;
    w = 0;
    while (!finished && w < 2000) begin
      @(posedge clk); #1; w++;
      if (rsp_q.size() != 0) drive(rsp_q.pop_front());
    end
    repeat (2) @(posedge clk);   // last completion pulse arrives with `finished`
    #1;
    check(finished && n_done == 7, $sformatf("finished %0d completions %0d", finished, n_done));
    check(n_hits >= 2, $sformatf("cache hits %0d", n_hits));   // re-read of $11, write of $44
    check(seen_q.size() == 0, "only remote reads were sent");
    check(n_sent == 3, $sformatf("remote reads sent %0d, expected 3 ($44 $88 $AA)", n_sent));
    // bypass: a packet for C enters and leaves one cycle later unchanged
    sent_before = n_sent;
    drive('{dest: 2'd2, trans: T_READ_HOL, src: 2'd1, addr: 8'h99, data: 32'hDEAD_BEEF});
    check(ring_out_valid && ring_out.dest == 2'd2 && ring_out.data == 32'hDEAD_BEEF &&
          ring_out.addr == 8'h99, "bypassed packet on ring output");
    @(posedge clk); #1;
    check(n_bypass == 1, $sformatf("bypass events %0d", n_bypass));
    // D reads $11 at home A: A's cache holds the only copy
    seen_q.delete();
    drive('{dest: 2'd0, trans: T_REMOTE_READ, src: 2'd3, addr: 8'h11, data: 32'h0});
    w = 0;
    while (seen_q.size() < 1 && w < 100) begin @(posedge clk); #1; w++; end
    check(seen_q.size() == 1, "one reply to D");
    if (seen_q.size() >= 1)
      check(seen_q[0].dest == 2'd3 && seen_q[0].data == 32'h11 &&
            (seen_q[0].trans == T_OLD_TO_NEW || seen_q[0].trans == T_RETURN_DATA),
            $sformatf("reply to D %p", seen_q[0]));
    check(!proto_err, "no protocol error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
