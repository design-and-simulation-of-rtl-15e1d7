// digit_shift_reg: SR1 / SR2, the operand A shift registers.
//
// A is split by bit parity: SR1 is loaded with the even bits (A2 A0 for the
// 4-bit design) and SR2 with the odd bits (A3 A1). Each register presents its
// least significant bit at q0, so {SR2.q0, SR1.q0} is one 2-bit digit of A:
// A1A0 before the first pulse, A3A2 after it. Each shift moves the register
// one place toward q0 and fills with zero, so once the digits are used up the
// multipliers see zero. A parallel load and a one-bit-per-pulse shift are this
// design's reading of the block; load wins over shift. Asynchronous
// active-low reset to zero.
module digit_shift_reg #(
  parameter int unsigned W = 2   // bits held: N/2 for an N-bit operand
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,    // parallel load of d
  input  logic         shift,   // shift one place toward q0, zero fill
  input  logic [W-1:0] d,
  output logic         q0       // current bit of the digit
);
  logic [W-1:0] r;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)      r <= '0;
    else if (load)   r <= d;
    else if (shift)  r <= W'(r >> 1);

  assign q0 = r[0];
endmodule
