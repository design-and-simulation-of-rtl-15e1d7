// full_adder: one-bit full adder, the cell of the ripple-carry adders.
// s = x ^ y ^ cin, cout = majority(x, y, cin). Combinational.
module full_adder (
  input  logic x,
  input  logic y,
  input  logic cin,
  output logic s,
  output logic cout
);
  always_comb begin
    s    = x ^ y ^ cin;
    cout = (x & y) | (cin & (x ^ y));
  end
endmodule
