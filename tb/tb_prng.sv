// Exhaustive test of the xor/shift generator: for every 8-bit seed the
// output is compared with the step computed bit-slice by bit-slice
// (high five bits folded onto the low end, then the low three bits folded
// onto the high end), and the sequence from a non-zero seed is checked to
// never reach zero and to return to its seed.
module tb_prng;
  logic [7:0] cur, nxt;
  int checks = 0, failures = 0;

  prng dut (.cur, .nxt);

  function automatic logic [7:0] ref_step(logic [7:0] x);
    logic [7:0] a, b;
    a = x;
    a[4:0] = x[4:0] ^ x[7:3];
    b = a;
    b[7:5] = a[7:5] ^ a[2:0];
    return b;
  endfunction

  initial begin
    logic [7:0] s;
    int period;
    for (int i = 0; i < 256; i++) begin
      cur = 8'(i);
      #1;
      checks++;
      if (nxt !== ref_step(8'(i))) begin
        failures++;
        $display("FAIL: seed %h -> %h, expected %h", i, nxt, ref_step(8'(i)));
      end
    end
    s = 8'h5B;
    period = 0;
    do begin
      cur = s;
      #1;
      s = nxt;
      period++;
      checks++;
      if (s == 8'h00) failures++;
    end while (s != 8'h5B && period < 300);
    checks++;
    if (period >= 300) failures++;
    $display("period from 5B: %0d", period);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
