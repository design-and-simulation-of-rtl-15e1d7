// mgdi_cell: switch-level Modified Gate Diffusion Input cell, as a logic gate.
//
// The cell is one pMOS and one nMOS with a common gate G and common drain
// (the output). The pMOS source is the P input and the nMOS source is the N
// input; in the modified cell the bulks go to the supply rails. With G low the
// pMOS conducts and the output follows P, with G high the nMOS conducts and
// the output follows N, so logically the cell is a 2:1 multiplexer
// out = G ? N : P. Tying P and N to constants or signals gives every gate of
// the cell table:
//   N=0 P=B -> !A&B (F1)    N=B P=1 -> !A|B (F2)    N=1 P=B -> A|B (OR)
//   N=B P=0 -> A&B  (AND)   N=C P=B -> mux          N=0 P=1 -> !A  (NOT)
// where A drives G. The transistor-level facts (threshold drop on a
// passed level, delay, power) are outside a logic model and are not
// represented; the output here is the ideal full-swing value. Purely
// combinational, no timing.
module mgdi_cell (
  input  logic g,    // common gate G
  input  logic p,    // pMOS source P, passed when G = 0
  input  logic n,    // nMOS source N, passed when G = 1
  output logic out   // common drain
);
  always_comb out = g ? n : p;
endmodule
