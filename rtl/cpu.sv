// Transaction generator standing in for a node's processor.
//
// The CPU issues one read or write at a time to its decoder, and only while
// the scheduler gives it the time slot (`go`). Its request line `rq` is high
// while it still has transactions to run; after each completed transaction
// it drops `rq` until the scheduler has taken the slot away, then raises it
// again if work is left, so the slot passes round the ring after every
// transaction.
//
// Two sources of transactions, chosen by MODE:
//   MODE 0  the fixed demonstration script of sci_pkg::demo_txn, which builds
//           four-entry sharing lists and then writes from each list position;
//   MODE 1  random traffic: addresses come from the xor/shift generator
//           (prng), seeded with SEED and masked with ADDR_MASK; a further
//           bit of the generator chooses read or write, and write data
//           encodes node, transaction index and address.
// The random mode is how the original design was tested over the whole
// address space; the mask, the read/write choice and the write data are
// this design's own.
//
// A reply is accepted only if its address matches the outstanding request
// (the original CPU's check); each accepted reply is reported for one cycle
// on `done_valid`/`done_pkt` (address, rw, and the data read or written).
//
// Timing: the request is a one-cycle pulse on `req_valid` in the first cycle
// the CPU holds the slot; any number of cycles may pass until `rsp_valid`.
module cpu
  import sci_pkg::*;
#(
  parameter node_id_t    NODE_ID   = '0,
  parameter int unsigned MODE      = 0,
  parameter int unsigned N_TRANS   = DEMO_TRANS,
  parameter addr_t       SEED      = 8'h5B,
  parameter addr_t       ADDR_MASK = 8'hFF
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     go,
  output logic     rq,
  output logic     req_valid,
  output cpu_pkt_t req_pkt,
  input  logic     rsp_valid,
  input  cpu_pkt_t rsp_pkt,
  output logic     done_valid,
  output cpu_pkt_t done_pkt,
  output logic     finished
);
  typedef enum logic [1:0] {C_IDLE, C_WAIT, C_RELEASE} cst_t;
  cst_t        st;
  int unsigned idx;
  addr_t       seed_q;
  addr_t       seed_n;
  cpu_pkt_t    cur;
  cpu_pkt_t    next_txn;

  prng #(.WIDTH(8), .SHIFT_R(3)) u_prng (.cur(seed_q), .nxt(seed_n));

  always_comb begin
    if (MODE == 0) begin
      next_txn = demo_txn(NODE_ID, idx);
    end else begin
      next_txn.rw   = seed_n[3] ^ seed_n[6];
      next_txn.addr = seed_n & ADDR_MASK;
      next_txn.data = {6'h0, NODE_ID, 8'(idx), 8'hA5, seed_n & ADDR_MASK};
    end
  end

  assign finished = (idx >= N_TRANS);
  assign rq       = !finished && (st != C_RELEASE);

  always_ff @(posedge clk) begin
    if (rst) begin
      st         <= C_IDLE;
      idx        <= 0;
      seed_q     <= SEED;
      cur        <= '0;
      req_valid  <= 1'b0;
      req_pkt    <= '0;
      done_valid <= 1'b0;
      done_pkt   <= '0;
    end else begin
      req_valid  <= 1'b0;
      done_valid <= 1'b0;
      case (st)
        C_IDLE: if (go && !finished) begin
          cur       <= next_txn;
          req_pkt   <= next_txn;
          req_valid <= 1'b1;
          st        <= C_WAIT;
        end
        C_WAIT: if (rsp_valid && rsp_pkt.addr == cur.addr) begin
          done_valid <= 1'b1;
          done_pkt   <= '{rw: cur.rw, addr: cur.addr, data: rsp_pkt.data};
          idx        <= idx + 1;
          if (MODE != 0) seed_q <= seed_n;
          st         <= C_RELEASE;
        end
        default: if (!go) st <= C_IDLE;
      endcase
    end
  end
endmodule
