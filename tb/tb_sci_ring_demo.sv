// Full-size test of the four-node ring with every parameter at its default:
// each CPU runs the seven-transaction demonstration script. Checked:
//  * every CPU completion returns the expected data (reads see the initial
//    memory contents, writes echo the written value);
//  * the sharing lists after each node's sixth transaction (cache hits):
//    for $11 A is tail, B and C middle entries, D head;
//  * the final state: each written word is held by its writer alone as
//    HOEL with the new data, the other copies are purged, the home
//    directory points at the writer, and the untouched $AA list is intact;
//  * the ring messages of the first round of reads of $11, and of each of
//    the four writes (tail, middle, middle and head writer), arrive at the
//    expected nodes in the expected order;
//  * the scheduler visits the nodes in round-robin order, and the number of
//    cycles the whole script takes stays within a bound.
module tb_sci_ring_demo;
  import sci_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic      [NODES-1:0] go, rq, link_valid, done_valid, finished;
  ring_pkt_t [NODES-1:0] link_pkt;
  cpu_pkt_t  [NODES-1:0] done_pkt;
  logic      [NODES-1:0] ev_hit, ev_flush, ev_bypass, ev_inject_stall, ev_recirculate, proto_err;

  sci_ring dut (.*);

  int checks = 0, failures = 0;
  int n_done [NODES];
  int order_q[$];
  int cycles = 0;
  int n_hit = 0, n_bypass = 0;
  int trans_seen [16];

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // Expected value of completion idx of node n (independent of the RTL).
  function automatic logic [31:0] expect_data(int n, int idx);
    logic [7:0] a;
    if (idx == 6) return 32'(n == 0 ? 4 : n == 1 ? 8 : n == 2 ? 2 : 1);
    case (idx)
      0: a = 8'h11; 1: a = 8'h22; 2: a = 8'h44; 3: a = 8'h88; 4: a = 8'hAA;
      default: a = (n == 3) ? 8'h22 : 8'h11;
    endcase
    return {24'h0, a};
  endfunction

  // Find the cache line of node n holding address a; returns state.
  `define CLINES(n) dut.g_node[n].u_node.u_cache.lines
  function automatic void find_line(int n, logic [7:0] a, output cstate_t s, output node_id_t f,
                                    output node_id_t b, output logic [31:0] d);
    s = CS_UNUSED; f = '0; b = '0; d = '0;
    for (int j = 0; j < 128; j++) begin
      case (n)
        0: if (`CLINES(0)[j].state != CS_UNUSED && `CLINES(0)[j].addr == a) begin
             s = `CLINES(0)[j].state; f = `CLINES(0)[j].forw; b = `CLINES(0)[j].back; d = `CLINES(0)[j].data; end
        1: if (`CLINES(1)[j].state != CS_UNUSED && `CLINES(1)[j].addr == a) begin
             s = `CLINES(1)[j].state; f = `CLINES(1)[j].forw; b = `CLINES(1)[j].back; d = `CLINES(1)[j].data; end
        2: if (`CLINES(2)[j].state != CS_UNUSED && `CLINES(2)[j].addr == a) begin
             s = `CLINES(2)[j].state; f = `CLINES(2)[j].forw; b = `CLINES(2)[j].back; d = `CLINES(2)[j].data; end
        default: if (`CLINES(3)[j].state != CS_UNUSED && `CLINES(3)[j].addr == a) begin
             s = `CLINES(3)[j].state; f = `CLINES(3)[j].forw; b = `CLINES(3)[j].back; d = `CLINES(3)[j].data; end
      endcase
    end
  endfunction

  task automatic expect_line(int n, logic [7:0] a, cstate_t es, int ef, int eb, logic [31:0] ed);
    cstate_t s; node_id_t f, b; logic [31:0] d;
    find_line(n, a, s, f, b, d);
    check(s == es, $sformatf("node %0d addr %h state %0d expected %0d", n, a, s, es));
    if (es != CS_UNUSED) begin
      if (ef >= 0) check(f == node_id_t'(ef), $sformatf("node %0d addr %h forw %0d expected %0d", n, a, f, ef));
      if (eb >= 0) check(b == node_id_t'(eb), $sformatf("node %0d addr %h back %0d expected %0d", n, a, b, eb));
      check(d == ed, $sformatf("node %0d addr %h data %h expected %h", n, a, d, ed));
    end
  endtask

  always @(posedge clk) if (!rst) begin
    cycles++;
    for (int n = 0; n < NODES; n++) begin
      if (done_valid[n]) begin
        check(done_pkt[n].data == expect_data(n, n_done[n]),
              $sformatf("node %0d txn %0d data %h expected %h", n, n_done[n],
                        done_pkt[n].data, expect_data(n, n_done[n])));
        order_q.push_back(n);
        n_done[n]++;
      end
      if (ev_hit[n]) n_hit++;
      if (ev_bypass[n]) n_bypass++;
      check(!proto_err[n], $sformatf("protocol error at node %0d", n));
    end
  end

  // Transactions delivered to decoders. During the writes (after the 24th
  // completion) the deliveries for each written address are logged as
  // receiver*16 + transaction, in order.
  int wr_log [4][$];
  int rd_log [$];           // same, for $11 during the first four reads
  function automatic int wr_slot(logic [7:0] a);
    case (a)
      8'h44: return 0;
      8'h88: return 1;
      8'h22: return 2;
      8'h11: return 3;
      default: return -1;
    endcase
  endfunction
  for (genvar n = 0; n < NODES; n++) begin : g_mon
    always @(posedge clk) if (!rst && dut.g_node[n].u_node.rx_valid && dut.g_node[n].u_node.rx_ready) begin
      trans_seen[dut.g_node[n].u_node.rx_pkt.trans]++;
      if (order_q.size() >= 24 && wr_slot(dut.g_node[n].u_node.rx_pkt.addr) >= 0)
        wr_log[wr_slot(dut.g_node[n].u_node.rx_pkt.addr)].push_back(n * 16 + int'(dut.g_node[n].u_node.rx_pkt.trans));
      if (order_q.size() < 4 && dut.g_node[n].u_node.rx_pkt.addr == 8'h11)
        rd_log.push_back(n * 16 + int'(dut.g_node[n].u_node.rx_pkt.trans));
    end
  end

  // Expected message order of each write, worked out by hand from the
  // lists D(head) -> C -> B -> A(tail) that the reads build:
  //  A writes $44 (tail, home B): 14 to B, 12 back, 11 to B, B purges from
  //    head D: 8 to D, C, B, then B (new tail) answers 7 to A.
  //  B writes $88 (middle, home C): 9 to A, 12 back, 10 to C, 12 back,
  //    11 to C, 8 to D, C, A, 7 from A to B.
  //  C writes $22 (middle, home A): 9 to B, 12, 10 to D, 12, 11 to A,
  //    8 to D, B, A, 7 to C.
  //  D writes $11 (head): 8 to C, B, A, 7 to D.
  localparam int A = 0, B = 16, C = 32, D = 48;
  // First reads of $11 (home A): A reads its own memory (no messages);
  // B: 1 to A, A is head (HOEL -> TLE) and answers 6; C: 1 to A, 4 to head
  // B, 6 from B; D: 1 to A, 4 to head C, 6 from C.
  int rd_exp [$] = '{A+1, B+6, A+1, B+4, C+6, A+1, C+4, D+6};
  int wr_exp [4][$] = '{
    '{B+14, A+12, B+11, D+8, C+8, B+8, A+7},
    '{A+9, B+12, C+10, B+12, C+11, D+8, C+8, A+8, B+7},
    '{B+9, C+12, D+10, C+12, A+11, D+8, B+8, A+8, C+7},
    '{C+8, B+8, A+8, D+7}
  };

  // After the 24th completion (all hits done) check the list of $11.
  bit lists_checked = 0;
  always @(posedge clk) if (!rst && !lists_checked && order_q.size() == 24) begin
    lists_checked = 1;
    expect_line(3, 8'h11, CS_HOL, 2, -1, 32'h11);
    expect_line(2, 8'h11, CS_RLE, 1, 3, 32'h11);
    expect_line(1, 8'h11, CS_RLE, 0, 2, 32'h11);
    expect_line(0, 8'h11, CS_TLE, -1, 1, 32'h11);
    expect_line(3, 8'h22, CS_HOL, 2, -1, 32'h22);
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (n_done[n]) n_done[n] = 0;
    foreach (trans_seen[t]) trans_seen[t] = 0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    wait (&finished);
    repeat (50) @(posedge clk);
    for (int n = 0; n < NODES; n++) check(n_done[n] == 7, $sformatf("node %0d completed %0d", n, n_done[n]));
    for (int i = 0; i < order_q.size(); i++)
      check(order_q[i] == i % 4, $sformatf("completion %0d from node %0d", i, order_q[i]));
    check(lists_checked, "list check reached");
    // Final lists.
    expect_line(0, 8'h44, CS_HOEL, -1, -1, 32'h4);
    for (int n = 1; n < 4; n++) expect_line(n, 8'h44, CS_UNUSED, -1, -1, 0);
    expect_line(1, 8'h88, CS_HOEL, -1, -1, 32'h8);
    for (int n = 0; n < 4; n++) if (n != 1) expect_line(n, 8'h88, CS_UNUSED, -1, -1, 0);
    expect_line(2, 8'h22, CS_HOEL, -1, -1, 32'h2);
    for (int n = 0; n < 4; n++) if (n != 2) expect_line(n, 8'h22, CS_UNUSED, -1, -1, 0);
    expect_line(3, 8'h11, CS_HOEL, -1, -1, 32'h1);
    for (int n = 0; n < 3; n++) expect_line(n, 8'h11, CS_UNUSED, -1, -1, 0);
    expect_line(3, 8'hAA, CS_HOL, 2, -1, 32'hAA);
    expect_line(2, 8'hAA, CS_RLE, 1, 3, 32'hAA);
    expect_line(1, 8'hAA, CS_RLE, 0, 2, 32'hAA);
    expect_line(0, 8'hAA, CS_TLE, -1, 1, 32'hAA);
    // Home directories point at the new heads.
    check(dut.g_node[0].u_node.u_mem.mem_forw[8'h11 & 63] == 2'd3 &&
          dut.g_node[0].u_node.u_mem.mem_state[8'h11 & 63] == MS_SHARED, "dir $11 -> D");
    check(dut.g_node[0].u_node.u_mem.mem_forw[8'h22 & 63] == 2'd2, "dir $22 -> C");
    check(dut.g_node[1].u_node.u_mem.mem_forw[8'h44 & 63] == 2'd0, "dir $44 -> A");
    check(dut.g_node[2].u_node.u_mem.mem_forw[8'h88 & 63] == 2'd1, "dir $88 -> B");
    check(dut.g_node[2].u_node.u_mem.mem_forw[8'hAA & 63] == 2'd3, "dir $AA -> D");
    check(rd_log == rd_exp, "message order of the first reads of $11");
    // Message order of the four writes.
    for (int k = 0; k < 4; k++) begin
      string got = "";
      foreach (wr_log[k][i]) got = {got, $sformatf(" %0d:%0d", wr_log[k][i] / 16, wr_log[k][i] % 16)};
      check(wr_log[k] == wr_exp[k], $sformatf("write %0d message order (node:trans)%s", k, got));
    end
    // Mechanisms of the scenario.
    check(n_hit == 4 + 4, $sformatf("cache hits %0d", n_hit));   // 4 read hits + 4 write hits
    check(n_bypass > 0, "packets bypassed nodes");
    foreach (trans_seen[t])
      if (t inside {1, 4, 6, 7, 8, 9, 10, 11, 12, 14})
        check(trans_seen[t] > 0, $sformatf("transaction %0d used", t));
    check(cycles < 3000, $sformatf("script took %0d cycles", cycles));
    $display("cycles=%0d hits=%0d bypass=%0d", cycles, n_hit, n_bypass);
    foreach (trans_seen[t]) $display("trans %0d seen %0d", t, trans_seen[t]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
