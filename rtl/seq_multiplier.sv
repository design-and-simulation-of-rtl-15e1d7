// seq_multiplier: N-bit x N-bit sequential multiplier built from 2-bit MGDI
// multipliers (N = 4 by default).
//
// Operand A is fed two bits per pulse: SR1 holds its even bits and SR2 its
// odd bits, and their output bits form the current digit of A. B stays in
// Register1. There is one 2-bit multiplier per digit of B; multiplier 0 sees
// the A digit straight from SR1/SR2 and each further multiplier sees it one
// pulse later through a 2-bit pipeline register, so on pulse t multiplier j
// forms A_digit(t-j) * B_digit(j). For N = 4:
//   pulse 0: A1A0*B1B0
//   pulse 1: A3A2*B1B0 and A1A0*B3B2
//   pulse 2: A3A2*B3B2
// Every product of pulse t has weight 4^t. The products are captured in the
// product registers (SR5 for multiplier 0, SR4 for multiplier 1), summed by
// RCA1, shifted left 2t places into SR3 and added by RCA2 to Register2, whose
// output feeds back to RCA2. After the last pulse Register2 holds A*B.
//
// Interface: pulse start for one cycle while busy is low; a and b are sampled
// on that edge. done goes high for one cycle N+1 rising edges later (5 for
// N = 4) with the product on `product`, which then holds until the next
// start; start may be raised again in the done cycle, so one product is
// finished every N+1 cycles. N must be
// even. The data path and the pulse schedule follow the published block
// diagram and its description; the pipeline registers between the
// multipliers, the handshake and the reset are this design's choices.
module seq_multiplier #(
  parameter int unsigned N = 4   // operand width, even
) (
  input  logic           clk,
  input  logic           rst_n,    // asynchronous, active low
  input  logic           start,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic           busy,
  output logic           done,
  output logic [2*N-1:0] product
);
  import mulseq_pkg::*;

  localparam int unsigned K  = N / 2;              // digits = multipliers
  localparam int unsigned TW = $clog2(N);
  localparam int unsigned SW = 4 + $clog2(K);      // RCA1 sum width

  // ---------------- timing and control ----------------
  logic          ld, pulse, sr3_ld, acc_ld;
  logic [TW-1:0] sr3_t;

  timing_control #(.N(N)) u_ctrl (
    .clk, .rst_n, .start, .busy, .done,
    .ld, .pulse, .sr3_ld, .sr3_t, .acc_ld
  );

  // ---------------- operands ----------------
  logic [N-1:0] b_q;
  operand_reg #(.W(N)) u_register1 (.clk, .rst_n, .load(ld), .d(b), .q(b_q));

  logic [K-1:0] a_even, a_odd;
  for (genvar i = 0; i < K; i++) begin : g_split
    assign a_even[i] = a[2*i];
    assign a_odd[i]  = a[2*i+1];
  end

  logic sr1_q0, sr2_q0;
  digit_shift_reg #(.W(K)) u_sr1 (.clk, .rst_n, .load(ld), .shift(pulse), .d(a_even), .q0(sr1_q0));
  digit_shift_reg #(.W(K)) u_sr2 (.clk, .rst_n, .load(ld), .shift(pulse), .d(a_odd),  .q0(sr2_q0));

  // A digit seen by each multiplier: multiplier 0 from SR2/SR1, the others
  // one pulse behind their neighbour.
  digit_t a_dig [K];
  assign a_dig[0] = {sr2_q0, sr1_q0};
  for (genvar j = 1; j < K; j++) begin : g_apipe
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n)      a_dig[j] <= '0;
      else if (ld)     a_dig[j] <= '0;
      else if (pulse)  a_dig[j] <= a_dig[j-1];
  end

  // ---------------- 2-bit multipliers and product registers ----------------
  prod2_t prod [K];
  prod2_t preg [K];
  for (genvar j = 0; j < K; j++) begin : g_mul
    mul2_mgdi u_mul (.a(a_dig[j]), .b(b_q[2*j +: 2]), .p(prod[j]));
    product_reg #(.W(4)) u_preg (.clk, .rst_n, .clr(ld), .load(pulse), .d(prod[j]), .q(preg[j]));
  end

  // ---------------- RCA1, SR3, RCA2, Register2 ----------------
  logic [SW-1:0] rca1_sum;
  product_adder #(.K(K)) u_rca1 (.prods(preg), .sum(rca1_sum));

  logic [2*N-1:0] sr3_q;
  sr3_shift_reg #(.N(N), .SW(SW), .TW(TW)) u_sr3 (
    .clk, .rst_n, .clr(ld), .load(sr3_ld), .shamt(sr3_t), .d(rca1_sum), .q(sr3_q)
  );

  logic [2*N-1:0] acc_q, rca2_sum;
  logic           rca2_cout;
  rca #(.W(2*N)) u_rca2 (.x(sr3_q), .y(acc_q), .cin(1'b0), .s(rca2_sum), .cout(rca2_cout));

  acc_reg #(.W(2*N)) u_register2 (.clk, .rst_n, .clr(ld), .load(acc_ld), .d(rca2_sum), .q(acc_q));

  assign product = acc_q;

  // The partial sums never exceed the final product, so RCA2 never overflows.
  a_no_ovf: assert property (@(posedge clk) disable iff (!rst_n) acc_ld |-> !rca2_cout);
endmodule
