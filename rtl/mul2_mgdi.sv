// mul2_mgdi: 2-bit x 2-bit multiplier whose every gate is an MGDI cell.
//
// The product bits come from a Karnaugh-map minimisation of the 2x2
// multiplication truth table, arranged for the cell:
//   P0 = A0 B0
//   P1 = !B1 B0 A1 + B1 !A1 A0 + !B0 A0 B1 + B0 A1 !A0
//   P2 = A1 B1 (!A0 + !B0)
//   P3 = A1 A0 B1 B0
// Each two-literal product with one complemented literal is a single F1 cell
// (G = the complemented signal, P = the other, N = 0), so each term of P1 is
// an F1 cell followed by an AND cell, and three OR cells join the four terms.
// (!A0 + !B0) is an F2 cell fed by an inverter cell on B0. A1 B1 is shared by
// P2 and P3, and P3 reuses P0. The equations are the published ones; the way
// the cells are wired to realise them (16 cells, 32 transistors) is this
// design's own netlist. Purely combinational: p follows a and b.
module mul2_mgdi (
  input  mulseq_pkg::digit_t a,   // A1A0
  input  mulseq_pkg::digit_t b,   // B1B0
  output mulseq_pkg::prod2_t p    // P3P2P1P0
);
  logic a0, a1, b0, b1;
  assign {a1, a0} = a;
  assign {b1, b0} = b;

  // P0 = A0 B0 (AND: G=A0, N=B0, P=0)
  logic p0;
  mgdi_cell u_p0 (.g(a0), .p(1'b0), .n(b0), .out(p0));

  // P1, term by term
  logic nb1_b0, na1_a0, nb0_b1, na0_a1;          // F1 cells
  logic t1, t2, t3, t4;                          // three-literal terms
  logic o12, o34, p1;
  mgdi_cell u_f1a (.g(b1), .p(b0), .n(1'b0), .out(nb1_b0));   // !B1 B0
  mgdi_cell u_f1b (.g(a1), .p(a0), .n(1'b0), .out(na1_a0));   // !A1 A0
  mgdi_cell u_f1c (.g(b0), .p(b1), .n(1'b0), .out(nb0_b1));   // !B0 B1
  mgdi_cell u_f1d (.g(a0), .p(a1), .n(1'b0), .out(na0_a1));   // !A0 A1
  mgdi_cell u_t1  (.g(a1), .p(1'b0), .n(nb1_b0), .out(t1));   // !B1 B0 A1
  mgdi_cell u_t2  (.g(b1), .p(1'b0), .n(na1_a0), .out(t2));   // B1 !A1 A0
  mgdi_cell u_t3  (.g(a0), .p(1'b0), .n(nb0_b1), .out(t3));   // !B0 A0 B1
  mgdi_cell u_t4  (.g(b0), .p(1'b0), .n(na0_a1), .out(t4));   // B0 A1 !A0
  mgdi_cell u_o12 (.g(t1), .p(t2), .n(1'b1), .out(o12));      // OR
  mgdi_cell u_o34 (.g(t3), .p(t4), .n(1'b1), .out(o34));      // OR
  mgdi_cell u_p1  (.g(o12), .p(o34), .n(1'b1), .out(p1));     // OR

  // P2 = A1 B1 (!A0 + !B0)
  logic a1b1, nb0, nand0, p2;
  mgdi_cell u_a1b1 (.g(a1), .p(1'b0), .n(b1), .out(a1b1));    // AND
  mgdi_cell u_nb0  (.g(b0), .p(1'b1), .n(1'b0), .out(nb0));   // NOT
  mgdi_cell u_f2   (.g(a0), .p(1'b1), .n(nb0), .out(nand0));  // F2: !A0 + !B0
  mgdi_cell u_p2   (.g(a1b1), .p(1'b0), .n(nand0), .out(p2)); // AND

  // P3 = (A1 B1)(A0 B0)
  logic p3;
  mgdi_cell u_p3 (.g(a1b1), .p(1'b0), .n(p0), .out(p3));      // AND

  assign p = {p3, p2, p1, p0};
endmodule
