// product_reg: SR4 / SR5, the registers between the 2-bit multipliers and
// RCA1.
//
// On every multiplier pulse the register captures the 4-bit product of its
// multiplier, so RCA1 sees the products of one pulse side by side one clock
// later. clr (used when a new multiplication starts) has priority over load.
// Holding one product in parallel, rather than shifting it serially, is this
// design's reading of the block. Asynchronous active-low reset to zero.
module product_reg #(
  parameter int unsigned W = 4   // product width of a 2-bit multiplier
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,    // synchronous clear
  input  logic         load,   // capture d
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)     q <= '0;
    else if (clr)   q <= '0;
    else if (load)  q <= d;
endmodule
