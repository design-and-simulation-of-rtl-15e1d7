// tb_mul2_mgdi: exhaustive test of the 2-bit MGDI multiplier.
// All 16 input pairs are applied. Each output is compared with the published
// truth table, written out below row by row as P3P2P1P0, and also with the
// integer product a*b. Combinational.
module tb_mul2_mgdi;
  import mulseq_pkg::*;
  int checks = 0, failures = 0;
  digit_t a, b;
  prod2_t p;

  mul2_mgdi dut (.a(a), .b(b), .p(p));

  // Truth table, index {A1,A0,B1,B0}
  localparam logic [3:0] TRUTH [16] = '{
    4'b0000, 4'b0000, 4'b0000, 4'b0000,
    4'b0000, 4'b0001, 4'b0010, 4'b0011,
    4'b0000, 4'b0010, 4'b0100, 4'b0110,
    4'b0000, 4'b0011, 4'b0110, 4'b1001
  };

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {a, b} = 4'(v);
      #1;
      checks++;
      if (p !== TRUTH[v]) begin
        failures++;
        $display("FAIL table A=%0d B=%0d got %b exp %b", a, b, p, TRUTH[v]);
      end
      checks++;
      if (p !== 4'(int'(a) * int'(b))) begin
        failures++;
        $display("FAIL product A=%0d B=%0d got %0d", a, b, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
