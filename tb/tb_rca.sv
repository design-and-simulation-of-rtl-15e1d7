// tb_rca: ripple-carry adder test at its default width (8 bits).
// Every pair of 8-bit addends is applied with carry-in 0 and 1 and the
// {cout, s} result compared with the integer sum. Combinational.
module tb_rca;
  localparam int W = 8;
  int checks = 0, failures = 0;
  logic [W-1:0] x, y, s;
  logic cin, cout;

  rca dut (.x, .y, .cin, .s, .cout);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << W); i++)
      for (int j = 0; j < (1 << W); j++)
        for (int c = 0; c < 2; c++) begin
          x = W'(i); y = W'(j); cin = c[0];
          #1;
          checks++;
          if ({cout, s} !== (W+1)'(i + j + c)) begin
            failures++;
            if (failures < 10) $display("FAIL %0d+%0d+%0d got %0d", i, j, c, {cout, s});
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
