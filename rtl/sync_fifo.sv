// Small synchronous first-in first-out buffer.
//
// DEPTH entries of WIDTH bits held in a register array with read and write
// pointers and an occupancy count. A write when `full` and a read when
// `empty` are ignored (and flagged by assertions). `rd_data` shows the oldest
// entry combinationally; a read and a write may happen in the same cycle.
module sync_fifo #(
  parameter int unsigned WIDTH = 48,
  parameter int unsigned DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic             full
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] buf_q [DEPTH];
  logic [PW-1:0]    wp, rp;
  logic [PW:0]      cnt;
  logic             do_wr, do_rd;

  assign empty   = (cnt == 0);
  assign full    = (cnt == (PW+1)'(DEPTH));
  assign do_wr   = wr_en && !full;
  assign do_rd   = rd_en && !empty;
  assign rd_data = buf_q[rp];

  function automatic logic [PW-1:0] bump(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      wp  <= '0;
      rp  <= '0;
      cnt <= '0;
      for (int i = 0; i < DEPTH; i++) buf_q[i] <= '0;
    end else begin
      if (do_wr) begin
        buf_q[wp] <= wr_data;
        wp        <= bump(wp);
      end
      if (do_rd) rp <= bump(rp);
      cnt <= cnt + (PW+1)'(do_wr) - (PW+1)'(do_rd);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (rst) !(wr_en && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (rst) !(rd_en && empty));
endmodule
