// tb_acc_reg: Register2 test. Random clr, load and data for 3000 cycles, changed at
// the falling edge; a reference with clr over load predicts q after every
// rising edge. Reset must leave q at zero.
module tb_acc_reg;
  localparam int W = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clr = 0, load = 0;
  logic [W-1:0] d = '0, q, ref_q;

  acc_reg dut (.clk, .rst_n, .clr, .load, .d, .q);
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
      clr  = ($urandom_range(7) == 0);
      load = 1'($urandom);
      d    = W'($urandom);
      @(posedge clk);
      if (clr) ref_q = '0;
      else if (load) ref_q = d;
      #1;
      checks++;
      if (q !== ref_q) begin failures++; $display("FAIL cycle %0d q=%0h exp %0h", n, q, ref_q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
