// Fully associative cache of one node, holding SCI sharing-list state.
//
// Each of the LINES lines holds a global address, 32-bit data, the line's
// list state (unused, HOEL, HOL, RLE, TLE), a forward pointer (next node
// towards the tail), a backward pointer (previous node towards the head) and
// an AGE_W-bit age used for least-recently-used replacement. The decoder
// drives one operation per cycle with `req_valid`, a 2-bit control code and
// a 48-bit packet:
//   CC_RW, flag 0   read: look the address up; reply flag=1 with the line on
//                   a hit, flag=0 on a miss
//   CC_RW, flag 1   write: place the packet's fields in the first free line
//                   or, when none is free, over the least recently used line
//                   (the line already holding the address if there is one)
//   CC_UPDATE       overwrite state, pointers and data of the line holding
//                   the address
//   CC_FLUSH        return the line that the next write would replace
//   CC_WIPE         clear the line holding the address to all zeros
// Read, write and update clear the age of the line they touch and add one
// to the age of every other line (saturating); flush and wipe leave ages
// alone. The oldest line is the replacement victim, ties going to the
// lowest index. `flush_req` is high while every line is in use: the decoder
// then evicts the victim (keeping the list coherent) before the next write.
//
// Follows the original cache (128 lines, 10-bit ages, oldest-first
// replacement, lowest index on ties, the four operations); the control-code
// values for update and flush, saturating ages, which operations age the
// lines, and flushing as soon as the cache is full are this design's choices.
//
// Timing: the reply `rsp_valid`/`rsp_pkt` is registered, one cycle after
// the request, for every operation.
module cache
  import sci_pkg::*;
#(
  parameter int unsigned LINES = CACHE_LINES_DEF,
  parameter int unsigned AGE_BITS = AGE_W
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        req_valid,
  input  cache_ctrl_t ctrl,
  input  cache_pkt_t  req_pkt,
  output logic        rsp_valid,
  output cache_pkt_t  rsp_pkt,
  output logic        flush_req
);
  localparam int unsigned IW = (LINES > 1) ? $clog2(LINES) : 1;

  typedef struct packed {
    cstate_t          state;
    addr_t            addr;
    node_id_t         forw;
    node_id_t         back;
    data_t            data;
  } line_t;

  line_t               lines [LINES];
  logic [AGE_BITS-1:0] age   [LINES];

  logic          hit;
  logic [IW-1:0] hit_idx;
  logic          any_free;
  logic [IW-1:0] free_idx;
  logic [IW-1:0] lru_idx;
  logic [IW-1:0] wr_idx;

  // Address match, first free line and oldest line.
  always_comb begin
    logic [AGE_BITS-1:0] oldest;
    hit      = 1'b0;
    hit_idx  = '0;
    any_free = 1'b0;
    free_idx = '0;
    lru_idx  = '0;
    oldest   = '0;
    for (int i = 0; i < LINES; i++) begin
      if (!hit && lines[i].state != CS_UNUSED && lines[i].addr == req_pkt.addr) begin
        hit     = 1'b1;
        hit_idx = IW'(i);
      end
      if (!any_free && lines[i].state == CS_UNUSED) begin
        any_free = 1'b1;
        free_idx = IW'(i);
      end
      if (i == 0 || age[i] > oldest) begin
        oldest  = age[i];
        lru_idx = IW'(i);
      end
    end
    wr_idx = hit ? hit_idx : (any_free ? free_idx : lru_idx);
  end

  assign flush_req = !any_free;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < LINES; i++) begin
        lines[i] <= '0;
        age[i]   <= '0;
      end
      rsp_valid <= 1'b0;
      rsp_pkt   <= '0;
    end else begin
      rsp_valid <= req_valid;
      if (req_valid) begin
        logic          aging;  // this operation ages the lines
        logic          touch;  // ... and clears the age of line tidx
        logic [IW-1:0] tidx;
        aging = 1'b0;
        touch = 1'b0;
        tidx  = '0;
        rsp_pkt <= '0;
        case (ctrl)
          CC_RW: begin
            if (req_pkt.flag) begin
              lines[wr_idx] <= '{state: req_pkt.state, addr: req_pkt.addr,
                                 forw: req_pkt.forw, back: req_pkt.back,
                                 data: req_pkt.data};
              rsp_pkt       <= req_pkt;
              aging = 1'b1;
              touch = 1'b1;
              tidx  = wr_idx;
            end else begin
              aging = 1'b1;
              touch = hit;
              if (hit) begin
                tidx    = hit_idx;
                rsp_pkt <= '{flag: 1'b1, addr: lines[hit_idx].addr,
                             state: lines[hit_idx].state, forw: lines[hit_idx].forw,
                             back: lines[hit_idx].back, data: lines[hit_idx].data};
              end else begin
                rsp_pkt <= '{flag: 1'b0, addr: req_pkt.addr, state: CS_UNUSED,
                             forw: '0, back: '0, data: '0};
              end
            end
          end
          CC_UPDATE: begin
            if (hit) begin
              lines[hit_idx] <= '{state: req_pkt.state, addr: req_pkt.addr,
                                  forw: req_pkt.forw, back: req_pkt.back,
                                  data: req_pkt.data};
              aging = 1'b1;
              touch = 1'b1;
              tidx  = hit_idx;
            end
            rsp_pkt <= '{flag: hit, addr: req_pkt.addr, state: req_pkt.state,
                         forw: req_pkt.forw, back: req_pkt.back, data: req_pkt.data};
          end
          CC_FLUSH: begin
            rsp_pkt <= '{flag: lines[lru_idx].state != CS_UNUSED, addr: lines[lru_idx].addr,
                         state: lines[lru_idx].state, forw: lines[lru_idx].forw,
                         back: lines[lru_idx].back, data: lines[lru_idx].data};
          end
          default: begin  // CC_WIPE
            if (hit) begin
              lines[hit_idx] <= '0;
              age[hit_idx]   <= '0;
            end
            rsp_pkt <= '{flag: hit, addr: req_pkt.addr, state: CS_UNUSED,
                         forw: '0, back: '0, data: '0};
          end
        endcase
        if (aging) begin
          for (int i = 0; i < LINES; i++) begin
            if (touch && IW'(i) == tidx)
              age[i] <= '0;
            else if (age[i] != '1)
              age[i] <= age[i] + 1'b1;
          end
        end
      end
    end
  end
endmodule
