// acc_reg: Register2, the accumulator behind RCA2.
//
// Holds the running sum of weighted partial products. Its output goes back to
// RCA2, which adds the next weighted sum from SR3, and the result is stored
// here again; after the last accumulation it holds the full product, and it
// keeps it until the next multiplication clears it. clr has priority over
// load. Asynchronous active-low reset to zero.
module acc_reg #(
  parameter int unsigned W = 8   // 2N for an N-bit multiplier
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,    // synchronous clear at the start of an operation
  input  logic         load,   // store RCA2's sum
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)     q <= '0;
    else if (clr)   q <= '0;
    else if (load)  q <= d;
endmodule
