// tb_product_adder: RCA1 test. The default two-input adder gets every pair
// of 4-bit products (0..15 each, beyond the 0..9 a 2-bit multiplier makes);
// a four-input instance (the 8-bit multiplier's RCA1) gets random products
// in 0..9. Sums are compared with integer addition. Combinational.
module tb_product_adder;
  import mulseq_pkg::*;
  int checks = 0, failures = 0;

  prod2_t p2 [2];
  logic [4:0] s2;
  product_adder dut2 (.prods(p2), .sum(s2));

  prod2_t p4 [4];
  logic [5:0] s4;
  product_adder #(.K(4)) dut4 (.prods(p4), .sum(s4));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        p2[0] = 4'(i); p2[1] = 4'(j);
        #1;
        checks++;
        if (s2 !== 5'(i + j)) begin
          failures++;
          $display("FAIL K=2 %0d+%0d got %0d", i, j, s2);
        end
      end
    for (int n = 0; n < 2000; n++) begin
      int tot;
      tot = 0;
      for (int k = 0; k < 4; k++) begin
        p4[k] = 4'($urandom_range(9));
        tot += int'(p4[k]);
      end
      #1;
      checks++;
      if (s4 !== 6'(tot)) begin
        failures++;
        $display("FAIL K=4 got %0d exp %0d", s4, tot);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
