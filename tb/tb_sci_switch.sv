// Switch test for node B: packets for other nodes leave on the next cycle
// unchanged (bypass); packets for B reach the decoder side in order; a
// decoder packet goes out in the first cycle with no passing traffic and
// waits (inject stall) while the ring is busy; with the receive queue full
// and the decoder not reading, a packet for B is sent round the ring again.
module tb_sci_switch;
  import sci_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic      ring_in_valid, ring_out_valid, rx_valid, rx_ready, tx_valid, tx_ready;
  ring_pkt_t ring_in, ring_out, rx_pkt, tx_pkt;
  logic      bypass, inject_stall, recirculate;
  int        n_stall = 0, n_recirc = 0, n_bypass = 0;

  sci_switch #(.NODE_ID(2'd1)) dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic ring_pkt_t pk(int dest, int tag);
    return '{dest: 2'(dest), trans: T_REMOTE_READ, src: 2'd0, addr: 8'(tag), data: 32'(tag)};
  endfunction

  always @(posedge clk) if (!rst) begin
    n_stall  += int'(inject_stall);
    n_recirc += int'(recirculate);
    n_bypass += int'(bypass);
  end

  initial begin
    ring_in_valid = 0; ring_in = '0; rx_ready = 0; tx_valid = 0; tx_pkt = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    // bypass
    ring_in_valid = 1; ring_in = pk(2, 1);
    @(posedge clk);
    #1 ring_in_valid = 0;
    check(ring_out_valid && ring_out == pk(2, 1), "bypass to next node after one cycle");
    check(!rx_valid, "bypassed packet not delivered");
    // delivery
    ring_in_valid = 1; ring_in = pk(1, 2);
    @(posedge clk);
    #1 ring_in = pk(1, 3);
    @(posedge clk);
    #1 ring_in_valid = 0;
    check(!ring_out_valid, "delivered packets do not go on");
    check(rx_valid && rx_pkt == pk(1, 2), "first delivered");
    rx_ready = 1;
    @(posedge clk);
    #1 check(rx_valid && rx_pkt == pk(1, 3), "second delivered in order");
    @(posedge clk);
    #1 rx_ready = 0;
    check(!rx_valid, "receive queue empty");
    // injection on an idle ring
    tx_valid = 1; tx_pkt = pk(3, 4);
    @(posedge clk);
    #1 tx_valid = 0;
    @(posedge clk);
    #1 check(ring_out_valid && ring_out == pk(3, 4), "injected on idle ring");
    // injection while traffic passes: waits for the gap
    ring_in_valid = 1; ring_in = pk(0, 5);
    tx_valid = 1; tx_pkt = pk(2, 6);
    @(posedge clk);
    #1 tx_valid = 0;
    check(ring_out == pk(0, 5), "passing packet first");
    ring_in = pk(3, 7);
    @(posedge clk);
    #1 check(ring_out == pk(3, 7), "still passing");
    ring_in = pk(0, 8);
    @(posedge clk);
    #1 check(ring_out == pk(0, 8), "last passing packet");
    ring_in_valid = 0;
    @(posedge clk);
    #1 check(ring_out_valid && ring_out == pk(2, 6), "decoder packet in the gap");
    @(posedge clk);
    #1;
    check(n_stall >= 2, $sformatf("inject stalls %0d", n_stall));
    // receive queue full: fifth packet recirculates
    for (int i = 0; i < 5; i++) begin
      ring_in_valid = 1; ring_in = pk(1, 10 + i);
      @(posedge clk);
      #1;
    end
    ring_in_valid = 0;
    check(ring_out_valid && ring_out == pk(1, 14), "fifth packet sent round again");
    rx_ready = 1;
    for (int i = 0; i < 4; i++) begin
      check(rx_valid && rx_pkt == pk(1, 10 + i), $sformatf("queued packet %0d", i));
      @(posedge clk);
      #1;
    end
    check(n_recirc == 1, $sformatf("recirculations %0d", n_recirc));
    check(n_bypass == 4, $sformatf("bypass count %0d", n_bypass));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
