// product_adder: RCA1, the sum of the products of one pulse.
//
// Takes the 4-bit products of the K 2-bit multipliers (SR5 and SR4 for the
// 4-bit design, K = 2) and adds them with a chain of K-1 ripple-carry
// adders, each SW bits wide, SW = 4 + clog2(K), wide enough for K products of
// at most 9. For K = 2 this is a single 5-bit ripple-carry adder. All products of one pulse have the same binary weight, so the
// sum needs no internal shifting. Combinational.
module product_adder #(
  parameter int unsigned K  = 2,                  // number of 2-bit multipliers
  parameter int unsigned SW = 4 + $clog2(K)       // sum width
) (
  input  mulseq_pkg::prod2_t prods [K],
  output logic [SW-1:0]      sum
);
  logic [SW-1:0] part [K];
  assign part[0] = SW'(prods[0]);

  for (genvar k = 1; k < K; k++) begin : g_stage
    logic unused_cout;
    rca #(.W(SW)) u_rca (
      .x   (part[k-1]),
      .y   (SW'(prods[k])),
      .cin (1'b0),
      .s   (part[k]),
      .cout(unused_cout)
    );
  end

  assign sum = part[K-1];
endmodule
