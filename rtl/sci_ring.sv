// Four-node cache-coherent distributed shared memory on a unidirectional ring.
//
// Nodes A, B, C and D (identifiers 0..3) are chained A -> B -> C -> D -> A
// by point-to-point 48-bit ring links, each with a valid bit. Every node
// owns a quarter of the 256-word global address space and caches any word;
// the SCI-style sharing lists held in the caches and memory directories
// keep the copies coherent. The scheduler hands a single time slot round
// the nodes so that only one CPU transaction is in progress at a time.
//
// Parameters: CACHE_LINES per node (128 in the original design), the CPU
// traffic source MODE (0: demonstration script, 1: pseudo-random), the
// number of transactions per CPU, the address mask of random traffic and
// the flush drain time. Every output is an observation port: the ring
// links, the scheduler's go/request lines, CPU completions, and event and
// error flags per node.
module sci_ring
  import sci_pkg::*;
#(
  parameter int unsigned CACHE_LINES  = CACHE_LINES_DEF,
  parameter int unsigned MODE         = 0,
  parameter int unsigned N_TRANS      = DEMO_TRANS,
  parameter addr_t       ADDR_MASK    = 8'hFF,
  parameter int unsigned DRAIN_CYCLES = 16
) (
  input  logic                  clk,
  input  logic                  rst,
  output logic      [NODES-1:0] go,
  output logic      [NODES-1:0] rq,
  output logic      [NODES-1:0] link_valid,   // link_*[i]: from node i to node i+1
  output ring_pkt_t [NODES-1:0] link_pkt,
  output logic      [NODES-1:0] done_valid,
  output cpu_pkt_t  [NODES-1:0] done_pkt,
  output logic      [NODES-1:0] finished,
  output logic      [NODES-1:0] ev_hit,
  output logic      [NODES-1:0] ev_flush,
  output logic      [NODES-1:0] ev_bypass,
  output logic      [NODES-1:0] ev_inject_stall,
  output logic      [NODES-1:0] ev_recirculate,
  output logic      [NODES-1:0] proto_err
);
  scheduler #(.N(NODES)) u_sched (.clk, .rst, .rq, .go);

  for (genvar i = 0; i < NODES; i++) begin : g_node
    localparam int unsigned PREV = (i + NODES - 1) % NODES;
    sci_node #(
      .NODE_ID(node_id_t'(i)), .CACHE_LINES(CACHE_LINES), .MODE(MODE),
      .N_TRANS(N_TRANS), .SEED(addr_t'(8'h5B + 8'(37 * i))), .ADDR_MASK(ADDR_MASK),
      .DRAIN_CYCLES(DRAIN_CYCLES)
    ) u_node (
      .clk, .rst,
      .go(go[i]), .rq(rq[i]),
      .ring_in_valid(link_valid[PREV]), .ring_in(link_pkt[PREV]),
      .ring_out_valid(link_valid[i]), .ring_out(link_pkt[i]),
      .done_valid(done_valid[i]), .done_pkt(done_pkt[i]), .finished(finished[i]),
      .ev_hit(ev_hit[i]), .ev_flush(ev_flush[i]), .ev_bypass(ev_bypass[i]),
      .ev_inject_stall(ev_inject_stall[i]), .ev_recirculate(ev_recirculate[i]),
      .proto_err(proto_err[i])
    );
  end
endmodule
