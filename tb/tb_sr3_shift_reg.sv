// tb_sr3_shift_reg: SR3 test. At the default size (4-bit multiplier: 5-bit
// sum, 8-bit result) random clr, load, pulse index t in 0..2 and data run for
// 3000 cycles; the reference multiplies the sum by 4^t. Every t is forced to
// occur. Reset must leave q at zero.
module tb_sr3_shift_reg;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clr = 0, load = 0;
  logic [1:0] shamt = '0;
  logic [4:0] d = '0;
  logic [7:0] q, ref_q;
  int seen_t [3] = '{0, 0, 0};

  sr3_shift_reg dut (.clk, .rst_n, .clr, .load, .shamt, .d, .q);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_q = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL reset q=%0h", q); end
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      clr   = ($urandom_range(7) == 0);
      load  = 1'($urandom);
      shamt = 2'($urandom_range(2));
      d     = 5'($urandom);
      @(posedge clk);
      if (clr) ref_q = '0;
      else if (load) begin
        ref_q = 8'(int'(d) * (4 ** int'(shamt)));
        seen_t[shamt]++;
      end
      #1;
      checks++;
      if (q !== ref_q) begin failures++; $display("FAIL cycle %0d q=%0h exp %0h", n, q, ref_q); end
    end
    for (int t = 0; t < 3; t++) begin
      checks++;
      if (seen_t[t] == 0) begin failures++; $display("FAIL shift %0d never used", 2*t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
