// Shared types and constants for the four-node SCI-style cache-coherent ring.
//
// The global address space is 256 words of 32 bits, split evenly over the
// nodes: the home node of an address is its top two bits, and the local
// memory index is the low six bits. Every block of the design talks through
// one of the packed packet structs below, whose field order and widths follow
// the packet layouts of the original design (CPU-decoder 41 bits,
// decoder-cache 48 bits, decoder-memory 40/42 bits, ring 48 bits). Instead of
// marking an empty wire with an all-ones "idle" pattern, every packet here
// travels with a separate valid bit.
package sci_pkg;

  localparam int unsigned NODES      = 4;
  localparam int unsigned NODE_W     = 2;   // node identifier width
  localparam int unsigned ADDR_W     = 8;   // global address width
  localparam int unsigned LADDR_W    = 6;   // local memory index width
  localparam int unsigned DATA_W     = 32;
  localparam int unsigned MEM_WORDS  = 64;  // words per node
  localparam int unsigned CACHE_LINES_DEF = 128;
  localparam int unsigned AGE_W      = 10;  // LRU age indicator width

  typedef logic [NODE_W-1:0]  node_id_t;
  typedef logic [ADDR_W-1:0]  addr_t;
  typedef logic [LADDR_W-1:0] laddr_t;
  typedef logic [DATA_W-1:0]  data_t;

  // Cache line states (3-bit encoding of the original design).
  typedef enum logic [2:0] {
    CS_UNUSED = 3'b000,
    CS_HOEL   = 3'b001,   // head of empty list: only copy, may be written
    CS_HOL    = 3'b010,   // head of a list with more than one entry
    CS_RLE    = 3'b011,   // regular (middle) list entry
    CS_TLE    = 3'b100    // tail list entry
  } cstate_t;

  // Memory directory state.
  typedef enum logic [1:0] {
    MS_NOT_SHARED = 2'b00,
    MS_SHARED     = 2'b01
  } mstate_t;

  // Inter-node transaction numbers.
  typedef enum logic [3:0] {
    T_HEAD_UPDATE   = 4'd0,
    T_REMOTE_READ   = 4'd1,
    T_REMOTE_WRITE  = 4'd2,
    T_RETURN_DATA   = 4'd3,
    T_READ_HOL      = 4'd4,
    T_WRITE_HOL     = 4'd5,
    T_OLD_TO_NEW    = 4'd6,
    T_PURGE_DONE    = 4'd7,
    T_PURGE_ROL     = 4'd8,
    T_UPD_BACK      = 4'd9,
    T_UPD_FORW      = 4'd10,
    T_MEM_UPD_PURGE = 4'd11,
    T_PTR_CONFIRM   = 4'd12,
    T_PURGE_COMPL   = 4'd13,
    T_TAIL_UPDATE   = 4'd14,
    T_FLUSH_MEM     = 4'd15
  } trans_t;

  // Cache control (decoder -> cache).
  typedef enum logic [1:0] {
    CC_UPDATE = 2'b00,
    CC_RW     = 2'b01,
    CC_WIPE   = 2'b10,
    CC_FLUSH  = 2'b11
  } cache_ctrl_t;

  // Memory control (decoder -> local memory).
  typedef enum logic [1:0] {
    MC_READ  = 2'b00,
    MC_WRITE = 2'b01,
    MC_FLUSH = 2'b10
  } mem_ctrl_t;

  // CPU <-> decoder packet (41 bits): R/W, address, data.
  typedef struct packed {
    logic  rw;      // 1 = write
    addr_t addr;
    data_t data;
  } cpu_pkt_t;

  // Decoder <-> cache packet (48 bits). Towards the cache, `flag` selects
  // write (1) or read (0); from the cache it reports hit (1) or miss (0).
  typedef struct packed {
    logic     flag;
    addr_t    addr;
    cstate_t  state;
    node_id_t forw;
    node_id_t back;
    data_t    data;
  } cache_pkt_t;

  // Decoder -> memory packet (40 bits).
  typedef struct packed {
    laddr_t   addr;
    node_id_t node_id;  // node becoming the new list head
    data_t    data;     // flush data
  } mem_req_t;

  // Memory -> decoder packet (42 bits).
  typedef struct packed {
    laddr_t   addr;
    mstate_t  state;
    node_id_t forw;
    data_t    data;
  } mem_rsp_t;

  // Ring packet (48 bits).
  typedef struct packed {
    node_id_t dest;
    trans_t   trans;
    node_id_t src;
    addr_t    addr;
    data_t    data;
  } ring_pkt_t;

  // Demonstration script: seven transactions per node. Run in round-robin
  // order, the five reads build a four-entry sharing list (head D, then C,
  // B, tail A) for each of $11, $22, $44, $88 and $AA; the sixth is a cache
  // hit; the seventh is a write made from a different list position at each
  // node (A: tail, B and C: middle, D: head).
  localparam int unsigned DEMO_TRANS = 7;

  function automatic cpu_pkt_t demo_txn(node_id_t node, int unsigned idx);
    cpu_pkt_t p;
    p = '{rw: 1'b0, addr: 8'h00, data: 32'h0};
    case (idx)
      0: p.addr = 8'h11;
      1: p.addr = 8'h22;
      2: p.addr = 8'h44;
      3: p.addr = 8'h88;
      4: p.addr = 8'hAA;
      5: p.addr = (node == 2'd3) ? 8'h22 : 8'h11;
      default: begin
        p.rw = 1'b1;
        case (node)
          2'd0: begin p.addr = 8'h44; p.data = 32'h0000_0004; end
          2'd1: begin p.addr = 8'h88; p.data = 32'h0000_0008; end
          2'd2: begin p.addr = 8'h22; p.data = 32'h0000_0002; end
          default: begin p.addr = 8'h11; p.data = 32'h0000_0001; end
        endcase
      end
    endcase
    return p;
  endfunction

  function automatic node_id_t home_of(addr_t a);
    return a[ADDR_W-1 -: NODE_W];
  endfunction

endpackage
