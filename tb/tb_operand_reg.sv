// tb_operand_reg: Register1 test. Random load and data for 2000 cycles,
// inputs changed at the falling edge; after each rising edge q is compared
// with a reference that captures d when load was high. Reset is applied
// first and q must be zero after it.
module tb_operand_reg;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load = 0;
  logic [3:0] d = '0, q, ref_q;

  operand_reg dut (.clk, .rst_n, .load, .d, .q);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
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
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      load = 1'($urandom);
      d    = 4'($urandom);
      @(posedge clk);
      if (load) ref_q = d;
      #1;
      checks++;
      if (q !== ref_q) begin failures++; $display("FAIL cycle %0d q=%0h exp %0h", n, q, ref_q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
