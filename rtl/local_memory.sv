// One node's slice of the distributed global memory, with its directory.
//
// WORDS words of 32-bit data; beside each word sits the SCI memory
// directory: a shared / not-shared state and a forward pointer naming the
// node at the head of the word's sharing list. The decoder has already
// subtracted the node's base address, so the same module serves every node.
// Operations (one per cycle, `req_valid` with a 2-bit control code):
//   MC_READ   reply with the word's old state, pointer and data, then mark
//             it shared with the requesting node (`node_id`) as list head
//   MC_WRITE  reply with the old state, pointer and data and update the
//             directory the same way; the data word is not written, since
//             the only valid copy now lives in the writer's cache
//   MC_FLUSH  write the flushed data, reply with it, and mark the word
//             not shared with the pointer cleared
// This follows the original memory entity. Initial contents are this
// design's choice: on reset every word holds its own global address,
// {NODE_ID, index}, so that reads of untouched words are checkable.
//
// Timing: the reply `rsp_valid`/`rsp_pkt` is registered one cycle after
// the request.
module local_memory
  import sci_pkg::*;
#(
  parameter int unsigned WORDS   = MEM_WORDS,
  parameter node_id_t    NODE_ID = '0
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      req_valid,
  input  mem_ctrl_t ctrl,
  input  mem_req_t  req_pkt,
  output logic      rsp_valid,
  output mem_rsp_t  rsp_pkt
);
  localparam int unsigned IW = $clog2(WORDS);

  data_t    mem_data  [WORDS];
  mstate_t  mem_state [WORDS];
  node_id_t mem_forw  [WORDS];

  logic [IW-1:0] idx;
  assign idx = req_pkt.addr[IW-1:0];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < WORDS; i++) begin
        mem_data[i]  <= data_t'({NODE_ID, LADDR_W'(i)});
        mem_state[i] <= MS_NOT_SHARED;
        mem_forw[i]  <= '0;
      end
      rsp_valid <= 1'b0;
      rsp_pkt   <= '0;
    end else begin
      rsp_valid <= req_valid;
      if (req_valid) begin
        case (ctrl)
          MC_FLUSH: begin
            mem_data[idx]  <= req_pkt.data;
            mem_state[idx] <= MS_NOT_SHARED;
            mem_forw[idx]  <= '0;
            rsp_pkt <= '{addr: req_pkt.addr, state: MS_NOT_SHARED, forw: '0,
                         data: req_pkt.data};
          end
          default: begin  // MC_READ, MC_WRITE
            mem_state[idx] <= MS_SHARED;
            mem_forw[idx]  <= req_pkt.node_id;
            rsp_pkt <= '{addr: req_pkt.addr, state: mem_state[idx], forw: mem_forw[idx],
                         data: mem_data[idx]};
          end
        endcase
      end
    end
  end
endmodule
