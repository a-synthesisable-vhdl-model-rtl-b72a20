// Coherence engine of one node: the SCI-style sharing-list protocol.
//
// The decoder sits between the node's CPU, cache, local memory and ring
// switch. It runs one job at a time:
//   * a CPU read or write, which always starts with a cache look-up and may
//     need local memory, ring transactions to other nodes, and finally a
//     cache fill or update and a reply to the CPU;
//   * the eviction ("flush") of the least recently used cache line, done
//     right after a CPU job whenever that job left the cache full;
//   * one incoming ring transaction from another node (service).
// Every cached block is on a doubly linked sharing list: the home memory
// points at the head; each cache line points forward (towards the tail) and
// backward (towards the head). Line states are HOEL (head of empty list,
// sole copy, writable), HOL (head of longer list), RLE (middle) and TLE
// (tail). Only a HOEL line may be written, so a writer first unlinks itself
// from the list, makes itself head through the home memory and purges the
// rest of the list, the tail confirming the purge.
//
// Ring transactions (the 16 of the original design):
//   0 head update        flushing HOL -> next entry becomes HOL/HOEL, confirms
//   1 remote read        to home: reply 3 (not shared), or 6 from the home's
//                        own head line, or forward as 4 to the head
//   2 remote write       to home: reply 3 (not shared), or purge from the
//                        home's own head line, or forward as 5 to the head
//   3 data / write ok    home -> requester: fill HOEL (read) or finish write
//   4 read to head       head: HOEL->TLE, HOL->RLE, back := requester, send 6
//   5 write to head      head: wipe; HOEL sends 7, HOL forwards purge 8
//   6 old head data      requester fills as HOL, forward := sender
//   7 purge complete     requester may write: line becomes HOEL
//   8 purge rest of list HOL/RLE wipe and forward; TLE (or HOEL) wipes, sends 7
//   9 update backward    back := source field, confirm 12 to node in data[31:30]
//  10 update forward     forw := source field, confirm 12 to node in data[31:30]
//  11 memory update      home: memory head := source field; data all zeros
//                        also purges the old list, all ones only updates
//  12 pointer confirm    answer to 0, 9, 10, 14
//  13 purge completion   accepted like 7
//  14 tail update        previous entry: HOL->HOEL, RLE->TLE, confirms 12
//  15 flush to memory    home writes back the data of an evicted HOEL line
// Packets that carry a requester in their source field (4, 5, 8 and the
// forwarded 11) keep it, so the tail can answer the requester directly.
//
// The protocol steps follow the original decoder. This design's own choices:
// a HOEL line reached by a purge (a list that shrank to one entry) is treated
// like a tail; a flush whose last message needs no answer (15, or 11 with all
// ones) waits DRAIN_CYCLES before the job ends, so that a later request
// cannot overtake it on the ring; a CPU request is latched until the decoder
// is free; a reply that is not the expected one is dropped and raises the
// sticky `proto_err` flag.
//
// Timing: cache and memory answer one cycle after a request; each cache or
// memory access costs two cycles here, each ring send at least one.
module decoder
  import sci_pkg::*;
#(
  parameter node_id_t    NODE_ID      = '0,
  parameter int unsigned DRAIN_CYCLES = 16
) (
  input  logic        clk,
  input  logic        rst,
  // CPU
  input  logic        cpu_valid,
  input  cpu_pkt_t    cpu_pkt,
  output logic        cpu_rsp_valid,
  output cpu_pkt_t    cpu_rsp,
  // cache
  output logic        c_valid,
  output cache_ctrl_t c_ctrl,
  output cache_pkt_t  c_req,
  input  logic        c_rsp_valid,
  input  cache_pkt_t  c_rsp,
  input  logic        c_flush_req,
  // local memory
  output logic        m_valid,
  output mem_ctrl_t   m_ctrl,
  output mem_req_t    m_req,
  input  logic        m_rsp_valid,
  input  mem_rsp_t    m_rsp,
  // switch
  input  logic        rx_valid,
  input  ring_pkt_t   rx_pkt,
  output logic        rx_ready,
  output logic        tx_valid,
  output ring_pkt_t   tx_pkt,
  input  logic        tx_ready,
  // status
  output logic        ev_hit,
  output logic        ev_flush,
  output logic        proto_err
);
  typedef enum logic [4:0] {
    S_IDLE, S_CWAIT, S_MWAIT, S_TX, S_WRX, S_REPLY,
    S_CPU_LK, S_RD_LM, S_WR_LM, S_FIN_WR, S_RESPOND, S_DONE,
    S_MEMPURGE, S_MP_LM,
    S_FL_LK, S_FL_MEMUPD, S_FL_DRAIN, S_FL_WIPE,
    S_SRV, S_SRV_M, S_SRV_C
  } st_t;

  // What a waiting job expects from the ring.
  typedef enum logic [2:0] {
    PH_READ_FILL, PH_WRITE_PERM, PH_POP1, PH_POP2, PH_TAIL, PH_HEADUPD
  } phase_t;

  // What a service job does with the cache line it looked up.
  typedef enum logic [2:0] {
    A_HEADUPD, A_HEADREAD, A_PURGE, A_BACK, A_FORW, A_TAILUPD
  } act_t;

  st_t        st, ret, nx_ret;
  phase_t     phase;
  act_t       act;
  logic       pop_for_write;   // after unlinking: 1 = memory update and purge, 0 = wipe (flush)
  logic       have_line;       // the CPU write hit in the cache
  logic       cpu_pend;
  cpu_pkt_t   cpu_q, cur;
  ring_pkt_t  p, nx_pkt;
  cache_pkt_t cl, ln;
  mem_rsp_t   mr;
  data_t      rdata;
  logic [$clog2(DRAIN_CYCLES+1)-1:0] drain;

  localparam data_t ALL_ONES = '1;

  function automatic ring_pkt_t mk(node_id_t dest, trans_t t, node_id_t src, addr_t a, data_t d);
    return '{dest: dest, trans: t, src: src, addr: a, data: d};
  endfunction

  function automatic cache_pkt_t line(logic flag, addr_t a, cstate_t s, node_id_t f,
                                      node_id_t b, data_t d);
    return '{flag: flag, addr: a, state: s, forw: f, back: b, data: d};
  endfunction

  function automatic mem_req_t mreq(addr_t a, node_id_t n, data_t d);
    return '{addr: a[LADDR_W-1:0], node_id: n, data: d};
  endfunction

  localparam data_t ME_IN_DATA = {NODE_ID, 30'h0};

  assign rx_ready = (st == S_IDLE) || (st == S_WRX);

  always_ff @(posedge clk) begin
    if (rst) begin
      st            <= S_IDLE;
      ret           <= S_IDLE;
      nx_ret        <= S_IDLE;
      phase         <= PH_READ_FILL;
      act           <= A_HEADUPD;
      pop_for_write <= 1'b0;
      have_line     <= 1'b0;
      cpu_pend      <= 1'b0;
      cpu_q         <= '0;
      cur           <= '0;
      p             <= '0;
      nx_pkt        <= '0;
      cl            <= '0;
      ln            <= '0;
      mr            <= '0;
      rdata         <= '0;
      drain         <= '0;
      cpu_rsp_valid <= 1'b0;
      cpu_rsp       <= '0;
      c_valid       <= 1'b0;
      c_ctrl        <= CC_RW;
      c_req         <= '0;
      m_valid       <= 1'b0;
      m_ctrl        <= MC_READ;
      m_req         <= '0;
      tx_valid      <= 1'b0;
      tx_pkt        <= '0;
      ev_hit        <= 1'b0;
      ev_flush      <= 1'b0;
      proto_err     <= 1'b0;
    end else begin
      cpu_rsp_valid <= 1'b0;
      c_valid       <= 1'b0;
      m_valid       <= 1'b0;
      tx_valid      <= 1'b0;
      ev_hit        <= 1'b0;
      ev_flush      <= 1'b0;
      if (cpu_valid) begin
        cpu_pend <= 1'b1;
        cpu_q    <= cpu_pkt;
      end

      case (st)
        // ------------------------------------------------------------ common
        S_IDLE: begin
          if (rx_valid) begin
            p  <= rx_pkt;
            st <= S_SRV;
          end else if (cpu_pend) begin
            cpu_pend <= 1'b0;
            cur      <= cpu_q;
            c_valid  <= 1'b1;
            c_ctrl   <= CC_RW;
            c_req    <= line(1'b0, cpu_q.addr, CS_UNUSED, '0, '0, '0);
            ret      <= S_CPU_LK;
            st       <= S_CWAIT;
          end
        end
        S_CWAIT: if (c_rsp_valid) begin
          cl <= c_rsp;
          st <= ret;
        end
        S_MWAIT: if (m_rsp_valid) begin
          mr <= m_rsp;
          st <= ret;
        end
        S_TX: if (tx_ready) begin
          tx_valid <= 1'b1;
          tx_pkt   <= nx_pkt;
          st       <= nx_ret;
        end
        S_WRX: if (rx_valid) begin
          p  <= rx_pkt;
          st <= S_REPLY;
        end

        // ------------------------------------------------------------ CPU job
        S_CPU_LK: begin
          if (!cur.rw) begin
            if (cl.flag) begin                        // read hit
              ev_hit <= 1'b1;
              rdata  <= cl.data;
              st     <= S_DONE;
            end else if (home_of(cur.addr) == NODE_ID) begin
              m_valid <= 1'b1;
              m_ctrl  <= MC_READ;
              m_req   <= mreq(cur.addr, NODE_ID, '0);
              ret     <= S_RD_LM;
              st      <= S_MWAIT;
            end else begin
              nx_pkt <= mk(home_of(cur.addr), T_REMOTE_READ, NODE_ID, cur.addr, '0);
              phase  <= PH_READ_FILL;
              nx_ret <= S_WRX;
              st     <= S_TX;
            end
          end else begin
            have_line <= cl.flag;
            ln        <= cl;
            if (cl.flag) begin
              ev_hit <= 1'b1;
              case (cl.state)
                CS_HOEL: begin                        // already exclusive
                  c_valid <= 1'b1;
                  c_ctrl  <= CC_UPDATE;
                  c_req   <= line(1'b1, cur.addr, CS_HOEL, cl.forw, cl.back, cur.data);
                  rdata   <= cur.data;
                  ret     <= S_RESPOND;
                  st      <= S_CWAIT;
                end
                CS_HOL: begin                         // purge the rest of the list
                  nx_pkt <= mk(cl.forw, T_PURGE_ROL, NODE_ID, cur.addr, '0);
                  phase  <= PH_WRITE_PERM;
                  nx_ret <= S_WRX;
                  st     <= S_TX;
                end
                CS_RLE: begin                         // unlink: next's back pointer first
                  nx_pkt        <= mk(cl.forw, T_UPD_BACK, cl.back, cur.addr, ME_IN_DATA);
                  phase         <= PH_POP1;
                  pop_for_write <= 1'b1;
                  nx_ret        <= S_WRX;
                  st            <= S_TX;
                end
                default: begin                        // TLE: unlink through the previous entry
                  nx_pkt        <= mk(cl.back, T_TAIL_UPDATE, NODE_ID, cur.addr, '0);
                  phase         <= PH_TAIL;
                  pop_for_write <= 1'b1;
                  nx_ret        <= S_WRX;
                  st            <= S_TX;
                end
              endcase
            end else if (home_of(cur.addr) == NODE_ID) begin
              m_valid <= 1'b1;
              m_ctrl  <= MC_READ;
              m_req   <= mreq(cur.addr, NODE_ID, '0);
              ret     <= S_WR_LM;
              st      <= S_MWAIT;
            end else begin
              nx_pkt <= mk(home_of(cur.addr), T_REMOTE_WRITE, NODE_ID, cur.addr, '0);
              phase  <= PH_WRITE_PERM;
              nx_ret <= S_WRX;
              st     <= S_TX;
            end
          end
        end
        S_RD_LM: begin                                // local read miss, memory answered
          if (mr.state == MS_NOT_SHARED) begin
            c_valid <= 1'b1;
            c_ctrl  <= CC_RW;
            c_req   <= line(1'b1, cur.addr, CS_HOEL, '0, '0, mr.data);
            rdata   <= mr.data;
            ret     <= S_RESPOND;
            st      <= S_CWAIT;
          end else begin
            nx_pkt <= mk(mr.forw, T_READ_HOL, NODE_ID, cur.addr, '0);
            phase  <= PH_READ_FILL;
            nx_ret <= S_WRX;
            st     <= S_TX;
          end
        end
        S_WR_LM: begin                                // local write miss
          if (mr.state == MS_NOT_SHARED) begin
            st <= S_FIN_WR;
          end else begin
            nx_pkt <= mk(mr.forw, T_PURGE_ROL, NODE_ID, cur.addr, '0);
            phase  <= PH_WRITE_PERM;
            nx_ret <= S_WRX;
            st     <= S_TX;
          end
        end
        S_MEMPURGE: begin                             // unlinked writer becomes head
          if (home_of(cur.addr) == NODE_ID) begin
            m_valid <= 1'b1;
            m_ctrl  <= MC_WRITE;
            m_req   <= mreq(cur.addr, NODE_ID, '0);
            ret     <= S_MP_LM;
            st      <= S_MWAIT;
          end else begin
            nx_pkt <= mk(home_of(cur.addr), T_MEM_UPD_PURGE, NODE_ID, cur.addr, '0);
            phase  <= PH_WRITE_PERM;
            nx_ret <= S_WRX;
            st     <= S_TX;
          end
        end
        S_MP_LM: begin
          if (mr.state == MS_NOT_SHARED) begin
            st <= S_FIN_WR;
          end else begin
            nx_pkt <= mk(mr.forw, T_PURGE_ROL, NODE_ID, cur.addr, '0);
            phase  <= PH_WRITE_PERM;
            nx_ret <= S_WRX;
            st     <= S_TX;
          end
        end
        S_FIN_WR: begin                               // exclusive: write the line
          c_valid <= 1'b1;
          c_ctrl  <= have_line ? CC_UPDATE : CC_RW;
          c_req   <= line(1'b1, cur.addr, CS_HOEL, '0, '0, cur.data);
          rdata   <= cur.data;
          ret     <= S_RESPOND;
          st      <= S_CWAIT;
        end
        S_RESPOND: begin
          if (c_flush_req) begin                      // cache full: evict before the next fill
            ev_flush <= 1'b1;
            c_valid  <= 1'b1;
            c_ctrl   <= CC_FLUSH;
            c_req    <= '0;
            ret      <= S_FL_LK;
            st       <= S_CWAIT;
          end else begin
            st <= S_DONE;
          end
        end
        S_DONE: begin
          cpu_rsp_valid <= 1'b1;
          cpu_rsp       <= '{rw: cur.rw, addr: cur.addr, data: rdata};
          st            <= S_IDLE;
        end

        // ------------------------------------------------------------ replies
        S_REPLY: begin
          st <= S_WRX;
          case (phase)
            PH_READ_FILL: begin
              if (p.trans == T_RETURN_DATA || p.trans == T_OLD_TO_NEW) begin
                c_valid <= 1'b1;
                c_ctrl  <= CC_RW;
                c_req   <= (p.trans == T_RETURN_DATA)
                           ? line(1'b1, cur.addr, CS_HOEL, '0, '0, p.data)
                           : line(1'b1, cur.addr, CS_HOL, p.src, '0, p.data);
                rdata   <= p.data;
                ret     <= S_RESPOND;
                st      <= S_CWAIT;
              end else proto_err <= 1'b1;
            end
            PH_WRITE_PERM: begin
              if (p.trans == T_RETURN_DATA || p.trans == T_PURGE_DONE ||
                  p.trans == T_PURGE_COMPL) st <= S_FIN_WR;
              else proto_err <= 1'b1;
            end
            PH_POP1: begin                            // next updated: now the previous one
              if (p.trans == T_PTR_CONFIRM) begin
                nx_pkt <= mk(ln.back, T_UPD_FORW, ln.forw, ln.addr, ME_IN_DATA);
                phase  <= PH_POP2;
                nx_ret <= S_WRX;
                st     <= S_TX;
              end else proto_err <= 1'b1;
            end
            PH_POP2, PH_TAIL: begin                   // unlinked from the list
              if (p.trans == T_PTR_CONFIRM) st <= pop_for_write ? S_MEMPURGE : S_FL_WIPE;
              else proto_err <= 1'b1;
            end
            default: begin                            // PH_HEADUPD
              if (p.trans == T_PTR_CONFIRM) st <= S_FL_MEMUPD;
              else proto_err <= 1'b1;
            end
          endcase
        end

        // ------------------------------------------------------------ flush
        S_FL_LK: begin
          ln <= cl;
          case (cl.state)
            CS_HOEL: begin                            // write the data back home
              if (home_of(cl.addr) == NODE_ID) begin
                m_valid <= 1'b1;
                m_ctrl  <= MC_FLUSH;
                m_req   <= mreq(cl.addr, NODE_ID, cl.data);
                ret     <= S_FL_WIPE;
                st      <= S_MWAIT;
              end else begin
                nx_pkt <= mk(home_of(cl.addr), T_FLUSH_MEM, NODE_ID, cl.addr, cl.data);
                drain  <= $bits(drain)'(DRAIN_CYCLES);
                nx_ret <= S_FL_DRAIN;
                st     <= S_TX;
              end
            end
            CS_HOL: begin                             // hand the head over to the next entry
              nx_pkt <= mk(cl.forw, T_HEAD_UPDATE, NODE_ID, cl.addr, '0);
              phase  <= PH_HEADUPD;
              nx_ret <= S_WRX;
              st     <= S_TX;
            end
            CS_RLE: begin
              nx_pkt        <= mk(cl.forw, T_UPD_BACK, cl.back, cl.addr, ME_IN_DATA);
              phase         <= PH_POP1;
              pop_for_write <= 1'b0;
              nx_ret        <= S_WRX;
              st            <= S_TX;
            end
            CS_TLE: begin
              nx_pkt        <= mk(cl.back, T_TAIL_UPDATE, NODE_ID, cl.addr, '0);
              phase         <= PH_TAIL;
              pop_for_write <= 1'b0;
              nx_ret        <= S_WRX;
              st            <= S_TX;
            end
            default: st <= S_DONE;
          endcase
        end
        S_FL_MEMUPD: begin                            // memory head := next entry
          if (home_of(ln.addr) == NODE_ID) begin
            m_valid <= 1'b1;
            m_ctrl  <= MC_WRITE;
            m_req   <= mreq(ln.addr, ln.forw, '0);
            ret     <= S_FL_WIPE;
            st      <= S_MWAIT;
          end else begin
            nx_pkt <= mk(home_of(ln.addr), T_MEM_UPD_PURGE, ln.forw, ln.addr, ALL_ONES);
            drain  <= $bits(drain)'(DRAIN_CYCLES);
            nx_ret <= S_FL_DRAIN;
            st     <= S_TX;
          end
        end
        S_FL_DRAIN: begin
          if (drain == 0) st <= S_FL_WIPE;
          else drain <= drain - 1'b1;
        end
        S_FL_WIPE: begin
          c_valid <= 1'b1;
          c_ctrl  <= CC_WIPE;
          c_req   <= line(1'b0, ln.addr, CS_UNUSED, '0, '0, '0);
          ret     <= S_DONE;
          st      <= S_CWAIT;
        end

        // ------------------------------------------------------------ service
        S_SRV: begin
          case (p.trans)
            T_REMOTE_READ: begin
              m_valid <= 1'b1;
              m_ctrl  <= MC_READ;
              m_req   <= mreq(p.addr, p.src, '0);
              ret     <= S_SRV_M;
              st      <= S_MWAIT;
            end
            T_REMOTE_WRITE, T_MEM_UPD_PURGE: begin
              m_valid <= 1'b1;
              m_ctrl  <= MC_WRITE;
              m_req   <= mreq(p.addr, p.src, '0);
              ret     <= S_SRV_M;
              st      <= S_MWAIT;
            end
            T_FLUSH_MEM: begin
              m_valid <= 1'b1;
              m_ctrl  <= MC_FLUSH;
              m_req   <= mreq(p.addr, p.src, p.data);
              ret     <= S_IDLE;
              st      <= S_MWAIT;
            end
            T_HEAD_UPDATE, T_READ_HOL, T_WRITE_HOL, T_PURGE_ROL,
            T_UPD_BACK, T_UPD_FORW, T_TAIL_UPDATE: begin
              case (p.trans)
                T_HEAD_UPDATE: act <= A_HEADUPD;
                T_READ_HOL:    act <= A_HEADREAD;
                T_UPD_BACK:    act <= A_BACK;
                T_UPD_FORW:    act <= A_FORW;
                T_TAIL_UPDATE: act <= A_TAILUPD;
                default:       act <= A_PURGE;     // 5, 8
              endcase
              c_valid <= 1'b1;
              c_ctrl  <= CC_RW;
              c_req   <= line(1'b0, p.addr, CS_UNUSED, '0, '0, '0);
              ret     <= S_SRV_C;
              st      <= S_CWAIT;
            end
            default: begin                            // a reply nobody waits for
              proto_err <= 1'b1;
              st        <= S_IDLE;
            end
          endcase
        end
        S_SRV_M: begin                                // home memory answered
          if (p.trans == T_MEM_UPD_PURGE && p.data == ALL_ONES) begin
            st <= S_IDLE;                             // head hand-over only
          end else if (mr.state == MS_NOT_SHARED) begin
            nx_pkt <= mk(p.src, (p.trans == T_MEM_UPD_PURGE) ? T_PURGE_DONE : T_RETURN_DATA,
                         NODE_ID, p.addr, (p.trans == T_REMOTE_READ) ? mr.data : '0);
            nx_ret <= S_IDLE;
            st     <= S_TX;
          end else if (mr.forw == NODE_ID) begin      // this node's cache holds the head
            act     <= (p.trans == T_REMOTE_READ) ? A_HEADREAD : A_PURGE;
            c_valid <= 1'b1;
            c_ctrl  <= CC_RW;
            c_req   <= line(1'b0, p.addr, CS_UNUSED, '0, '0, '0);
            ret     <= S_SRV_C;
            st      <= S_CWAIT;
          end else begin                              // pass the request to the head
            nx_pkt <= mk(mr.forw,
                         (p.trans == T_REMOTE_READ)  ? T_READ_HOL :
                         (p.trans == T_REMOTE_WRITE) ? T_WRITE_HOL : T_PURGE_ROL,
                         p.src, p.addr, '0);
            nx_ret <= S_IDLE;
            st     <= S_TX;
          end
        end
        S_SRV_C: begin                                // cache line of a service job
          if (!cl.flag) begin
            proto_err <= 1'b1;
            st        <= S_IDLE;
          end else begin
            c_valid <= 1'b1;
            c_ctrl  <= CC_UPDATE;
            ret     <= S_TX;
            nx_ret  <= S_IDLE;
            st      <= S_CWAIT;
            case (act)
              A_HEADUPD: begin
                c_req  <= line(1'b1, cl.addr, (cl.state == CS_TLE) ? CS_HOEL : CS_HOL,
                               cl.forw, cl.back, cl.data);
                nx_pkt <= mk(p.src, T_PTR_CONFIRM, NODE_ID, p.addr, '0);
              end
              A_HEADREAD: begin
                c_req  <= line(1'b1, cl.addr, (cl.state == CS_HOEL) ? CS_TLE : CS_RLE,
                               cl.forw, p.src, cl.data);
                nx_pkt <= mk(p.src, T_OLD_TO_NEW, NODE_ID, p.addr, cl.data);
              end
              A_PURGE: begin
                c_ctrl <= CC_WIPE;
                c_req  <= line(1'b0, cl.addr, CS_UNUSED, '0, '0, '0);
                nx_pkt <= (cl.state == CS_HOL || cl.state == CS_RLE)
                          ? mk(cl.forw, T_PURGE_ROL, p.src, p.addr, '0)
                          : mk(p.src, T_PURGE_DONE, NODE_ID, p.addr, '0);
              end
              A_BACK: begin
                c_req  <= line(1'b1, cl.addr, cl.state, cl.forw, p.src, cl.data);
                nx_pkt <= mk(p.data[DATA_W-1 -: NODE_W], T_PTR_CONFIRM, NODE_ID, p.addr, '0);
              end
              A_FORW: begin
                c_req  <= line(1'b1, cl.addr, cl.state, p.src, cl.back, cl.data);
                nx_pkt <= mk(p.data[DATA_W-1 -: NODE_W], T_PTR_CONFIRM, NODE_ID, p.addr, '0);
              end
              default: begin                          // A_TAILUPD
                c_req  <= line(1'b1, cl.addr, (cl.state == CS_HOL) ? CS_HOEL : CS_TLE,
                               cl.forw, cl.back, cl.data);
                nx_pkt <= mk(p.src, T_PTR_CONFIRM, NODE_ID, p.addr, '0);
              end
            endcase
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
