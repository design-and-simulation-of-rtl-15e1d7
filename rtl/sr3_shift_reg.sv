// sr3_shift_reg: SR3, which gives the sum of one pulse its binary weight.
//
// All products formed on pulse t (t = 0, 1, ...) have weight 4^t, because on
// pulse t multiplier j works on A digit t-j and B digit j. SR3 therefore loads
// RCA1's sum shifted left by 2t places: no shift for A1A0*B1B0, two places for
// A3A2*B1B0 + A1A0*B3B2 and four places for A3A2*B3B2 in the 4-bit design. It
// is built as a parallel load through a left shifter selected by t, which is
// this design's choice; the result is 2N bits wide. clr has priority over
// load. Asynchronous active-low reset to zero. q is valid one edge after load.
module sr3_shift_reg #(
  parameter int unsigned N  = 4,                 // operand width
  parameter int unsigned SW = 3 + $clog2(N),     // RCA1 sum width
  parameter int unsigned TW = $clog2(N)          // pulse index width
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clr,     // synchronous clear
  input  logic            load,    // capture the weighted sum
  input  logic [TW-1:0]   shamt,   // pulse index t; the shift is 2t
  input  logic [SW-1:0]   d,       // RCA1 sum
  output logic [2*N-1:0]  q
);
  logic [2*N-1:0] shifted;
  always_comb shifted = (2*N)'(d) << {shamt, 1'b0};

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)     q <= '0;
    else if (clr)   q <= '0;
    else if (load)  q <= shifted;
endmodule
