// Decoder test for node B (home of $40-$7F) with a real four-line cache and
// local memory; the testbench plays the CPU and the rest of the ring.
// A scripted exchange checks every message the decoder sends and the cache
// and directory state it leaves:
//   remote read miss (1 out, 6 in, fills HOL), read hit latency,
//   read-to-head service (4 in: HOL->RLE, 6 out), home service of a remote
//   read (not shared: 3 out; shared: forwarded as 4), write from a middle
//   entry (9, 12, 10, 12, 11, 7: ends HOEL), write-to-head service on a
//   HOEL line (5 in: wipe, 7 out), local write miss, home service of a
//   remote write whose head is this node (2 in: wipe, 7 out), tail update
//   and pointer update services (14, 10 in: 12 out), and evictions of a HOL
//   line (0 out, 12 in, local directory hand-over) and a HOEL line (local
//   memory flush).
module tb_decoder;
  import sci_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        cpu_valid, cpu_rsp_valid;
  cpu_pkt_t    cpu_pkt, cpu_rsp;
  logic        c_valid, c_rsp_valid, c_flush_req;
  cache_ctrl_t c_ctrl;
  cache_pkt_t  c_req, c_rsp;
  logic        m_valid, m_rsp_valid;
  mem_ctrl_t   m_ctrl;
  mem_req_t    m_req;
  mem_rsp_t    m_rsp;
  logic        rx_valid, rx_ready, tx_valid, tx_ready;
  ring_pkt_t   rx_pkt, tx_pkt;
  logic        ev_hit, ev_flush, proto_err;

  decoder #(.NODE_ID(2'd1), .DRAIN_CYCLES(4)) dut (.*);
  cache #(.LINES(4)) u_cache (.clk, .rst, .req_valid(c_valid), .ctrl(c_ctrl), .req_pkt(c_req),
                              .rsp_valid(c_rsp_valid), .rsp_pkt(c_rsp), .flush_req(c_flush_req));
  local_memory #(.NODE_ID(2'd1)) u_mem (.clk, .rst, .req_valid(m_valid), .ctrl(m_ctrl),
                                        .req_pkt(m_req), .rsp_valid(m_rsp_valid), .rsp_pkt(m_rsp));

  ring_pkt_t txq[$];
  int        n_flush = 0;
  always @(posedge clk) if (!rst) begin
    if (tx_valid) txq.push_back(tx_pkt);
    if (ev_flush) n_flush++;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  task automatic cpu(logic rw, logic [7:0] a, logic [31:0] d);
    cpu_pkt = '{rw: rw, addr: a, data: d};
    cpu_valid = 1;
    @(posedge clk);
    #1 cpu_valid = 0;
  endtask

  task automatic expect_tx(int dest, trans_t t, int src, logic [7:0] a, logic [31:0] d = 32'h0,
                           bit chk_data = 0);
    int w = 0;
    while (txq.size() == 0 && w < 60) begin @(posedge clk); #1; w++; end
    if (txq.size() == 0) begin
      check(0, $sformatf("no packet sent, expected trans %0d", t));
      return;
    end
    begin
      ring_pkt_t p = txq.pop_front();
      check(p.dest == 2'(dest) && p.trans == t && p.src == 2'(src) && p.addr == a &&
            (!chk_data || p.data == d),
            $sformatf("sent %p, expected dest %0d trans %0d src %0d addr %h", p, dest, t, src, a));
    end
  endtask

  task automatic send(trans_t t, int src, logic [7:0] a, logic [31:0] d = 32'h0);
    rx_pkt = '{dest: 2'd1, trans: t, src: 2'(src), addr: a, data: d};
    rx_valid = 1;
    do @(posedge clk); while (!rx_ready);
    #1 rx_valid = 0;
  endtask

  task automatic expect_cpu(logic [7:0] a, logic [31:0] d, output int lat);
    lat = 0;
    while (!cpu_rsp_valid && lat < 80) begin @(posedge clk); #1; lat++; end
    check(cpu_rsp_valid && cpu_rsp.addr == a && cpu_rsp.data == d,
          $sformatf("cpu reply %p, expected %h = %h", cpu_rsp, a, d));
    @(posedge clk);
    #1;
  endtask

  task automatic expect_line(logic [7:0] a, cstate_t s, int f = -1, int b = -1, logic [31:0] d = 0,
                             bit chk_data = 0);
    bit found = 0;
    for (int j = 0; j < 4; j++)
      if (u_cache.lines[j].state != CS_UNUSED && u_cache.lines[j].addr == a) begin
        found = 1;
        check(u_cache.lines[j].state == s, $sformatf("line %h state %0d, expected %0d", a, u_cache.lines[j].state, s));
        if (f >= 0) check(u_cache.lines[j].forw == 2'(f), $sformatf("line %h forw", a));
        if (b >= 0) check(u_cache.lines[j].back == 2'(b), $sformatf("line %h back", a));
        if (chk_data) check(u_cache.lines[j].data == d, $sformatf("line %h data %h", a, u_cache.lines[j].data));
      end
    check(found == (s != CS_UNUSED), $sformatf("line %h present %0d", a, found));
  endtask

  task automatic quiet(int n);
    repeat (n) @(posedge clk);
    #1 check(txq.size() == 0, "no unexpected packet");
  endtask

  initial begin
    int lat;
    cpu_valid = 0; cpu_pkt = '0; rx_valid = 0; rx_pkt = '0; tx_ready = 1;
    repeat (2) @(posedge clk);
    #1 rst = 0;

    // 1. remote read miss of $11 (home A); old head D answers
    cpu(0, 8'h11, 0);
    expect_tx(0, T_REMOTE_READ, 1, 8'h11);
    send(T_OLD_TO_NEW, 3, 8'h11, 32'h1111);
    expect_cpu(8'h11, 32'h1111, lat);
    expect_line(8'h11, CS_HOL, 3, -1, 32'h1111, 1);
    // 2. read hit, answered within 6 cycles, no ring traffic
    cpu(0, 8'h11, 0);
    expect_cpu(8'h11, 32'h1111, lat);
    check(lat <= 6, $sformatf("hit latency %0d", lat));
    quiet(5);
    // 3. C reads $11 through B as head
    send(T_READ_HOL, 2, 8'h11);
    expect_tx(2, T_OLD_TO_NEW, 1, 8'h11, 32'h1111, 1);
    expect_line(8'h11, CS_RLE, 3, 2);
    // 4. A reads $44 at home B: not shared
    send(T_REMOTE_READ, 0, 8'h44);
    expect_tx(0, T_RETURN_DATA, 1, 8'h44, 32'h44, 1);
    // 5. D reads $44: shared, head A -> forwarded as 4 with D as source
    send(T_REMOTE_READ, 3, 8'h44);
    expect_tx(0, T_READ_HOL, 3, 8'h44);
    // 6. write $11 from the middle of the list
    cpu(1, 8'h11, 32'hAB);
    expect_tx(3, T_UPD_BACK, 2, 8'h11, {2'd1, 30'h0}, 1);
    send(T_PTR_CONFIRM, 3, 8'h11);
    expect_tx(2, T_UPD_FORW, 3, 8'h11, {2'd1, 30'h0}, 1);
    send(T_PTR_CONFIRM, 2, 8'h11);
    expect_tx(0, T_MEM_UPD_PURGE, 1, 8'h11, 32'h0, 1);
    quiet(4);
    send(T_PURGE_DONE, 0, 8'h11);
    expect_cpu(8'h11, 32'hAB, lat);
    expect_line(8'h11, CS_HOEL, -1, -1, 32'hAB, 1);
    // 7. A writes $11 via head B (HOEL): wipe and confirm
    send(T_WRITE_HOL, 0, 8'h11);
    expect_tx(0, T_PURGE_DONE, 1, 8'h11);
    expect_line(8'h11, CS_UNUSED);
    // 8. local write miss of $50: memory not shared -> HOEL, no traffic
    cpu(1, 8'h50, 32'h50AA);
    expect_cpu(8'h50, 32'h50AA, lat);
    quiet(3);
    expect_line(8'h50, CS_HOEL, -1, -1, 32'h50AA, 1);
    // 9. C writes $50 at home B; head is B itself
    send(T_REMOTE_WRITE, 2, 8'h50);
    expect_tx(2, T_PURGE_DONE, 1, 8'h50);
    expect_line(8'h50, CS_UNUSED);
    check(u_mem.mem_forw[8'h50 & 63] == 2'd2, "directory of $50 names C");
    // 10. evictions: $44 becomes HOL via D, then three local fills
    cpu(0, 8'h44, 0);
    expect_tx(3, T_READ_HOL, 1, 8'h44);      // directory head after step 5 is D
    send(T_OLD_TO_NEW, 3, 8'h44, 32'h44);
    expect_cpu(8'h44, 32'h44, lat);
    expect_line(8'h44, CS_HOL, 3);
    send(T_TAIL_UPDATE, 3, 8'h44);            // pretend tail D left: HOL -> HOEL
    expect_tx(3, T_PTR_CONFIRM, 1, 8'h44);
    expect_line(8'h44, CS_HOEL);
    send(T_HEAD_UPDATE, 3, 8'h44);            // a new tail behind the head again: HOEL -> HOL
    expect_tx(3, T_PTR_CONFIRM, 1, 8'h44);
    expect_line(8'h44, CS_HOL);
    send(T_UPD_FORW, 2, 8'h44, {2'd2, 30'h0});
    expect_tx(2, T_PTR_CONFIRM, 1, 8'h44);
    expect_line(8'h44, CS_HOL, 2);
    cpu(0, 8'h41, 0);
    expect_cpu(8'h41, 32'h41, lat);
    cpu(0, 8'h42, 0);
    expect_cpu(8'h42, 32'h42, lat);
    cpu(0, 8'h43, 0);                          // cache now full: evict LRU $44 (HOL)
    expect_tx(2, T_HEAD_UPDATE, 1, 8'h44);
    check(!cpu_rsp_valid, "CPU waits for the eviction");
    send(T_PTR_CONFIRM, 2, 8'h44);
    expect_cpu(8'h43, 32'h43, lat);
    expect_line(8'h44, CS_UNUSED);
    check(u_mem.mem_forw[8'h44 & 63] == 2'd2 && u_mem.mem_state[8'h44 & 63] == MS_SHARED,
          "directory of $44 handed to C");
    cpu(0, 8'h45, 0);                          // evicts $41 (HOEL, local): memory flush
    expect_cpu(8'h45, 32'h45, lat);
    quiet(3);
    expect_line(8'h41, CS_UNUSED);
    check(u_mem.mem_state[8'h41 & 63] == MS_NOT_SHARED, "$41 flushed home");
    check(n_flush == 2, $sformatf("evictions %0d", n_flush));
    check(!proto_err, "no protocol error");
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
