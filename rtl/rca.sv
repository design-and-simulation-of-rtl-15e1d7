// rca: W-bit ripple-carry adder, a chain of full adders with the carry
// passed from bit i to bit i+1. Used as RCA2 (weighted sum plus Register2)
// and as each stage of RCA1. Combinational; the carry ripples through all W
// cells, which sets the adder's delay.
module rca #(
  parameter int unsigned W = 8   // 2N for the 4-bit multiplier's RCA2
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  logic [W:0] c;
  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (.x(x[i]), .y(y[i]), .cin(c[i]), .s(s[i]), .cout(c[i+1]));
  end

  assign cout = c[W];
endmodule
