// Ring interface of one node.
//
// Every cycle the switch looks at the packet arriving on the incoming ring
// link. A packet for another node bypasses the rest of the node and leaves
// on the outgoing link in the next cycle. A packet whose destination field
// equals NODE_ID is put in the receive queue towards the decoder. Packets
// from the decoder wait in the transmit queue and are put on the outgoing
// link only in a cycle in which no passing packet has to be forwarded, so
// traffic already on the ring always has priority. If the receive queue is
// full, a packet for this node is sent round the ring once more instead of
// being lost, and comes back a ring trip later.
//
// The routing rule and the buffering of decoder packets while the ring link
// is busy follow the original switch; queue depths, the ready/valid
// handshakes and the recirculation on a full receive queue are this
// design's choices.
//
// Interface: ring links carry `valid` plus a 48-bit ring packet; the
// decoder side uses valid/ready in both directions. `bypass`, `inject_stall`
// and `recirculate` pulse for one cycle when that event happens.
// Timing: ring in to ring out is one registered stage; ring in to
// `rx_valid` is one cycle (the queue's output is read combinationally).
module sci_switch
  import sci_pkg::*;
#(
  parameter node_id_t    NODE_ID  = '0,
  parameter int unsigned RX_DEPTH = 4,
  parameter int unsigned TX_DEPTH = 4
) (
  input  logic      clk,
  input  logic      rst,
  // ring
  input  logic      ring_in_valid,
  input  ring_pkt_t ring_in,
  output logic      ring_out_valid,
  output ring_pkt_t ring_out,
  // towards the decoder
  output logic      rx_valid,
  output ring_pkt_t rx_pkt,
  input  logic      rx_ready,
  // from the decoder
  input  logic      tx_valid,
  input  ring_pkt_t tx_pkt,
  output logic      tx_ready,
  // event pulses
  output logic      bypass,
  output logic      inject_stall,
  output logic      recirculate
);
  logic      for_me, rxq_full, rxq_empty, txq_full, txq_empty;
  logic      forward, take, inject;
  ring_pkt_t txq_head;

  assign for_me  = ring_in_valid && ring_in.dest == NODE_ID;
  assign take    = for_me && !rxq_full;
  assign forward = ring_in_valid && !take;
  assign inject  = !forward && !txq_empty;

  sync_fifo #(.WIDTH($bits(ring_pkt_t)), .DEPTH(RX_DEPTH)) u_rxq (
    .clk, .rst,
    .wr_en(take), .wr_data(ring_in),
    .rd_en(rx_valid && rx_ready), .rd_data(rx_pkt),
    .empty(rxq_empty), .full(rxq_full)
  );

  sync_fifo #(.WIDTH($bits(ring_pkt_t)), .DEPTH(TX_DEPTH)) u_txq (
    .clk, .rst,
    .wr_en(tx_valid && tx_ready), .wr_data(tx_pkt),
    .rd_en(inject), .rd_data(txq_head),
    .empty(txq_empty), .full(txq_full)
  );

  assign rx_valid = !rxq_empty;
  assign tx_ready = !txq_full;

  always_ff @(posedge clk) begin
    if (rst) begin
      ring_out_valid <= 1'b0;
      ring_out       <= '0;
      bypass         <= 1'b0;
      inject_stall   <= 1'b0;
      recirculate    <= 1'b0;
    end else begin
      ring_out_valid <= forward || inject;
      ring_out       <= forward ? ring_in : txq_head;
      bypass         <= forward && !for_me;
      inject_stall   <= forward && !txq_empty;
      recirculate    <= for_me && rxq_full;
    end
  end
endmodule
