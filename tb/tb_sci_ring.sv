// End-to-end random test of the four-node ring.
//
// Every CPU issues pseudo-random reads and writes over a small set of
// addresses spread across all four homes, and each cache has only four
// lines, so sharing lists form, grow, are purged by writes and lose entries
// to evictions all the time. A reference memory model (the last value
// written to each address, since the scheduler serialises transactions)
// checks every read. After each completion the sharing structure of every
// address is checked against the caches and directories: at most one head,
// all copies hold the reference value, the home directory names the head,
// head-to-tail forward pointers and tail-to-head back pointers form one
// chain covering every copy, and an address with no copies is not shared
// and holds the reference value in memory.
// Every inter-node transaction type the nodes send, cache hits and
// evictions of lines in each list state, and ring bypasses are counted; one
// that never happens is a failure.
module tb_sci_ring;
  import sci_pkg::*;

  localparam int unsigned LINES = 4;
  localparam int unsigned NT    = 300;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic      [NODES-1:0] go, rq, link_valid, done_valid, finished;
  ring_pkt_t [NODES-1:0] link_pkt;
  cpu_pkt_t  [NODES-1:0] done_pkt;
  logic      [NODES-1:0] ev_hit, ev_flush, ev_bypass, ev_inject_stall, ev_recirculate, proto_err;

  sci_ring #(.CACHE_LINES(LINES), .MODE(1), .N_TRANS(NT), .ADDR_MASK(8'hC1)) dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] model [256];
  int n_hit = 0, n_flush = 0, n_bypass = 0, n_done = 0, n_rd = 0, n_wr = 0;
  int trans_seen [16];
  int flush_state [8];

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  // Snapshot of one cache line.
  typedef struct { cstate_t s; node_id_t f, b; logic [31:0] d; } cl_t;

  function automatic cl_t get_line(int n, logic [7:0] a);
    cl_t r = '{s: CS_UNUSED, f: '0, b: '0, d: '0};
    for (int j = 0; j < LINES; j++) begin
      case (n)
        0: if (dut.g_node[0].u_node.u_cache.lines[j].state != CS_UNUSED && dut.g_node[0].u_node.u_cache.lines[j].addr == a)
             r = '{s: dut.g_node[0].u_node.u_cache.lines[j].state, f: dut.g_node[0].u_node.u_cache.lines[j].forw,
                   b: dut.g_node[0].u_node.u_cache.lines[j].back, d: dut.g_node[0].u_node.u_cache.lines[j].data};
        1: if (dut.g_node[1].u_node.u_cache.lines[j].state != CS_UNUSED && dut.g_node[1].u_node.u_cache.lines[j].addr == a)
             r = '{s: dut.g_node[1].u_node.u_cache.lines[j].state, f: dut.g_node[1].u_node.u_cache.lines[j].forw,
                   b: dut.g_node[1].u_node.u_cache.lines[j].back, d: dut.g_node[1].u_node.u_cache.lines[j].data};
        2: if (dut.g_node[2].u_node.u_cache.lines[j].state != CS_UNUSED && dut.g_node[2].u_node.u_cache.lines[j].addr == a)
             r = '{s: dut.g_node[2].u_node.u_cache.lines[j].state, f: dut.g_node[2].u_node.u_cache.lines[j].forw,
                   b: dut.g_node[2].u_node.u_cache.lines[j].back, d: dut.g_node[2].u_node.u_cache.lines[j].data};
        default: if (dut.g_node[3].u_node.u_cache.lines[j].state != CS_UNUSED && dut.g_node[3].u_node.u_cache.lines[j].addr == a)
             r = '{s: dut.g_node[3].u_node.u_cache.lines[j].state, f: dut.g_node[3].u_node.u_cache.lines[j].forw,
                   b: dut.g_node[3].u_node.u_cache.lines[j].back, d: dut.g_node[3].u_node.u_cache.lines[j].data};
      endcase
    end
    return r;
  endfunction

  function automatic void get_dir(logic [7:0] a, output mstate_t s, output node_id_t f, output logic [31:0] d);
    int i = a[5:0];
    case (a[7:6])
      2'd0: begin s = dut.g_node[0].u_node.u_mem.mem_state[i]; f = dut.g_node[0].u_node.u_mem.mem_forw[i]; d = dut.g_node[0].u_node.u_mem.mem_data[i]; end
      2'd1: begin s = dut.g_node[1].u_node.u_mem.mem_state[i]; f = dut.g_node[1].u_node.u_mem.mem_forw[i]; d = dut.g_node[1].u_node.u_mem.mem_data[i]; end
      2'd2: begin s = dut.g_node[2].u_node.u_mem.mem_state[i]; f = dut.g_node[2].u_node.u_mem.mem_forw[i]; d = dut.g_node[2].u_node.u_mem.mem_data[i]; end
      default: begin s = dut.g_node[3].u_node.u_mem.mem_state[i]; f = dut.g_node[3].u_node.u_mem.mem_forw[i]; d = dut.g_node[3].u_node.u_mem.mem_data[i]; end
    endcase
  endfunction

  // Sharing-list invariant of one address.
  task automatic check_list(logic [7:0] a);
    cl_t c [NODES];
    int ncopies = 0, nheads = 0, head = -1, cur, steps;
    mstate_t ms; node_id_t mf; logic [31:0] md;
    bit ok = 1;
    get_dir(a, ms, mf, md);
    for (int n = 0; n < NODES; n++) begin
      c[n] = get_line(n, a);
      if (c[n].s != CS_UNUSED) begin
        ncopies++;
        if (c[n].d != model[a]) ok = 0;
        if (c[n].s == CS_HOEL || c[n].s == CS_HOL) begin nheads++; head = n; end
      end
    end
    if (ncopies == 0) begin
      check(ms == MS_NOT_SHARED && md == model[a],
            $sformatf("addr %h: no copies but dir state %0d data %h model %h", a, ms, md, model[a]));
      return;
    end
    check(ok, $sformatf("addr %h: a cached copy differs from %h", a, model[a]));
    check(nheads == 1, $sformatf("addr %h: %0d heads", a, nheads));
    if (nheads != 1) return;
    check(ms == MS_SHARED && mf == node_id_t'(head), $sformatf("addr %h: dir -> %0d, head %0d", a, mf, head));
    // Walk head -> tail.
    cur = head; steps = 1;
    if (c[head].s == CS_HOEL) begin
      check(ncopies == 1, $sformatf("addr %h: HOEL with %0d copies", a, ncopies));
      return;
    end
    while (steps < 5) begin
      int nx = c[cur].f;
      if (c[nx].s == CS_UNUSED || c[nx].b != node_id_t'(cur)) begin ok = 0; break; end
      steps++;
      cur = nx;
      if (c[cur].s == CS_TLE) break;
      if (c[cur].s != CS_RLE) begin ok = 0; break; end
    end
    check(ok && c[cur].s == CS_TLE && steps == ncopies,
          $sformatf("addr %h: broken list (steps %0d copies %0d)", a, steps, ncopies));
  endtask

  always @(posedge clk) if (!rst) begin
    for (int n = 0; n < NODES; n++) begin
      check(!proto_err[n], $sformatf("protocol error at node %0d", n));
      if (ev_hit[n]) n_hit++;
      if (ev_flush[n]) n_flush++;
      if (ev_bypass[n]) n_bypass++;
      if (done_valid[n]) begin
        n_done++;
        if (done_pkt[n].rw) begin
          n_wr++;
          model[done_pkt[n].addr] = done_pkt[n].data;
        end else begin
          n_rd++;
          check(done_pkt[n].data == model[done_pkt[n].addr],
                $sformatf("node %0d read %h = %h, expected %h", n, done_pkt[n].addr,
                          done_pkt[n].data, model[done_pkt[n].addr]));
        end
      end
    end
  end

  // Check all lists a few cycles after each completion (the ring is quiet
  // by then, apart from a flush still draining in the next slot).
  always @(posedge clk) if (!rst && |done_valid) begin
    repeat (2) @(posedge clk);
    for (int a = 0; a < 256; a++) if ((a & 8'hC1) == a) check_list(8'(a));
  end

  for (genvar n = 0; n < NODES; n++) begin : g_mon
    always @(posedge clk) if (!rst) begin
      if (dut.g_node[n].u_node.rx_valid && dut.g_node[n].u_node.rx_ready)
        trans_seen[dut.g_node[n].u_node.rx_pkt.trans]++;
      if (dut.g_node[n].u_node.u_decoder.st == dut.g_node[n].u_node.u_decoder.S_FL_LK)
        flush_state[dut.g_node[n].u_node.u_decoder.cl.state]++;
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a++) model[a] = 32'(a);
    foreach (trans_seen[t]) trans_seen[t] = 0;
    foreach (flush_state[s]) flush_state[s] = 0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    wait (&finished);
    repeat (100) @(posedge clk);
    for (int a = 0; a < 256; a++) if ((a & 8'hC1) == a) check_list(8'(a));
    check(n_done == 4 * NT, $sformatf("%0d completions", n_done));
    check(n_hit > 0, "cache hits happened");
    check(n_flush > 0, "evictions happened");
    check(n_bypass > 0, "bypasses happened");
    for (int s = 1; s <= 4; s++) check(flush_state[s] > 0, $sformatf("eviction of a line in state %0d", s));
    foreach (trans_seen[t]) if (t != 13) check(trans_seen[t] > 0, $sformatf("transaction %0d used", t));
    $display("done=%0d reads=%0d writes=%0d hits=%0d flushes=%0d bypass=%0d", n_done, n_rd, n_wr, n_hit, n_flush, n_bypass);
    $display("evicted HOEL=%0d HOL=%0d RLE=%0d TLE=%0d", flush_state[1], flush_state[2], flush_state[3], flush_state[4]);
    foreach (trans_seen[t]) $display("trans %0d seen %0d", t, trans_seen[t]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
