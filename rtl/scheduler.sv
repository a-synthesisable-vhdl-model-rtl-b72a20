// Round-robin time-slot scheduler for the ring's CPUs.
//
// Only one CPU may run a transaction at a time, which is how the design keeps
// the coherence traffic serialised without SCI's split transactions or
// retry queues. The scheduler owns a pointer to the current node and raises
// that node's `go` line. The slot stays with the node while its request line
// `rq` is high; when the node drops `rq` (it finished a transaction, or has
// nothing to do) the pointer moves on to the next node in ring order
// (A, B, C, D, A, ...) on the next clock. After reset node A holds the slot.
//
// Timing: `go` is a one-hot decode of the registered pointer; a dropped `rq` is seen on the
// next rising edge and `go` moves one cycle later.
module scheduler #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] rq,
  output logic [N-1:0] go
);
  logic [$clog2(N)-1:0] cur;

  always_ff @(posedge clk) begin
    if (rst) begin
      cur <= '0;
    end else if (!rq[cur]) begin
      cur <= (cur == $clog2(N)'(N - 1)) ? '0 : cur + 1'b1;
    end
  end

  always_comb begin
    go      = '0;
    go[cur] = 1'b1;
  end

  a_onehot: assert property (@(posedge clk) disable iff (rst) $onehot(go));
endmodule
