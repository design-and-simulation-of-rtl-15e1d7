// operand_reg: Register1, the parallel-load register that holds operand B.
//
// B is captured on a clock edge with load high and then held for the whole
// multiplication; each 2-bit multiplier reads its own 2-bit slice of q
// (B1B0 for the first, B3B2 for the second). Asynchronous active-low reset to
// zero is this design's choice. q changes one clock edge after load.
module operand_reg #(
  parameter int unsigned W = 4   // operand width (4-bit design)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,   // capture d on this edge
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)    q <= '0;
    else if (load) q <= d;
endmodule
