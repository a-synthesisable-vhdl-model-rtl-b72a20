// Pseudo-random address generator of the CPU's random test mode.
//
// A Tausworthe-style xor/shift step: the seed is xored with itself shifted
// right by SHIFT_R bits, and the result is xored with itself shifted left by
// WIDTH-SHIFT_R bits. Shifts fill with zeros. The two shift amounts adding up
// to the word width, and the 8-bit word with a right shift of 3 and a left
// shift of 5, are taken from the original design. Purely combinational: the register holding the
// seed lives in the CPU. A zero seed maps to zero, so seeds must be non-zero.
module prng #(
  parameter int unsigned WIDTH   = 8,
  parameter int unsigned SHIFT_R = 3
) (
  input  logic [WIDTH-1:0] cur,
  output logic [WIDTH-1:0] nxt
);
  logic [WIDTH-1:0] stage1;

  always_comb begin
    stage1 = cur ^ (cur >> SHIFT_R);
    nxt    = stage1 ^ (stage1 << (WIDTH - SHIFT_R));
  end
endmodule
