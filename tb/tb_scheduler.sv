// Scheduler test: node A owns the slot after reset; the slot stays while
// the owner requests and moves one node on, in ring order, the cycle after
// the owner drops its request; nodes without requests are skipped one
// cycle each; exactly one go line is ever high.
module tb_scheduler;
  logic clk = 0, rst = 1;
  logic [3:0] rq, go;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  scheduler dut (.clk, .rst, .rq, .go);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    rq = 4'b1111;
    repeat (2) @(posedge clk);
    rst = 0;
    #1 check(go == 4'b0001, "A first after reset");
    repeat (5) @(posedge clk);
    #1 check(go == 4'b0001, "A keeps slot while requesting");
    for (int k = 0; k < 8; k++) begin
      int owner;
      owner = k % 4;
      check(go == 4'(1 << owner), $sformatf("owner %0d go %b", owner, go));
      rq[owner] = 0;
      @(posedge clk);
      #1 check(go == 4'(1 << ((owner + 1) % 4)), $sformatf("slot moved to %0d: %b", (owner + 1) % 4, go));
      rq[owner] = 1;
      repeat (3) @(posedge clk);
      #1;
    end
    // Only C requests: the slot walks past A, B, D in one cycle each.
    rq = 4'b0100;
    repeat (4) @(posedge clk);
    #1 check(go == 4'b0100, $sformatf("slot reaches C: %b", go));
    repeat (3) @(posedge clk);
    #1 check(go == 4'b0100, "C keeps slot");
    rq = 4'b0000;
    for (int k = 0; k < 8; k++) begin
      @(posedge clk);
      #1 check($onehot(go), "one-hot");
    end
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
