// One node of the ring: CPU, decoder, cache, local memory and switch.
//
// The CPU issues reads and writes to the global address space while the
// scheduler grants it the slot; the decoder runs the coherence protocol,
// using the node's cache, the node's 64-word share of global memory (with
// its directory) and the switch, which connects the node to the incoming
// and outgoing ring links. The node's identity NODE_ID (0..3 for nodes A..D)
// is passed to every part that needs it, and its memory holds global
// addresses NODE_ID*64 .. NODE_ID*64+63.
//
// The node's parts and their wiring follow the original design. Status
// outputs (CPU completions, cache hits, evictions, switch events, protocol
// error flag) are brought out for observation.
module sci_node
  import sci_pkg::*;
#(
  parameter node_id_t    NODE_ID      = '0,
  parameter int unsigned CACHE_LINES  = CACHE_LINES_DEF,
  parameter int unsigned MODE         = 0,
  parameter int unsigned N_TRANS      = DEMO_TRANS,
  parameter addr_t       SEED         = 8'h5B,
  parameter addr_t       ADDR_MASK    = 8'hFF,
  parameter int unsigned DRAIN_CYCLES = 16
) (
  input  logic      clk,
  input  logic      rst,
  // scheduler
  input  logic      go,
  output logic      rq,
  // ring
  input  logic      ring_in_valid,
  input  ring_pkt_t ring_in,
  output logic      ring_out_valid,
  output ring_pkt_t ring_out,
  // observation
  output logic      done_valid,
  output cpu_pkt_t  done_pkt,
  output logic      finished,
  output logic      ev_hit,
  output logic      ev_flush,
  output logic      ev_bypass,
  output logic      ev_inject_stall,
  output logic      ev_recirculate,
  output logic      proto_err
);
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

  cpu #(.NODE_ID(NODE_ID), .MODE(MODE), .N_TRANS(N_TRANS), .SEED(SEED),
        .ADDR_MASK(ADDR_MASK)) u_cpu (
    .clk, .rst, .go, .rq,
    .req_valid(cpu_valid), .req_pkt(cpu_pkt),
    .rsp_valid(cpu_rsp_valid), .rsp_pkt(cpu_rsp),
    .done_valid, .done_pkt, .finished
  );

  decoder #(.NODE_ID(NODE_ID), .DRAIN_CYCLES(DRAIN_CYCLES)) u_decoder (
    .clk, .rst,
    .cpu_valid, .cpu_pkt, .cpu_rsp_valid, .cpu_rsp,
    .c_valid, .c_ctrl, .c_req, .c_rsp_valid, .c_rsp, .c_flush_req,
    .m_valid, .m_ctrl, .m_req, .m_rsp_valid, .m_rsp,
    .rx_valid, .rx_pkt, .rx_ready, .tx_valid, .tx_pkt, .tx_ready,
    .ev_hit, .ev_flush, .proto_err
  );

  cache #(.LINES(CACHE_LINES)) u_cache (
    .clk, .rst,
    .req_valid(c_valid), .ctrl(c_ctrl), .req_pkt(c_req),
    .rsp_valid(c_rsp_valid), .rsp_pkt(c_rsp), .flush_req(c_flush_req)
  );

  local_memory #(.NODE_ID(NODE_ID)) u_mem (
    .clk, .rst,
    .req_valid(m_valid), .ctrl(m_ctrl), .req_pkt(m_req),
    .rsp_valid(m_rsp_valid), .rsp_pkt(m_rsp)
  );

  sci_switch #(.NODE_ID(NODE_ID)) u_switch (
    .clk, .rst,
    .ring_in_valid, .ring_in, .ring_out_valid, .ring_out,
    .rx_valid, .rx_pkt, .rx_ready,
    .tx_valid, .tx_pkt, .tx_ready,
    .bypass(ev_bypass), .inject_stall(ev_inject_stall), .recirculate(ev_recirculate)
  );
endmodule
