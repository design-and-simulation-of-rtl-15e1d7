// tb_digit_shift_reg: SR1/SR2 test at the 8-bit multiplier's size (4 bits
// held). Random load, shift and data for 3000 cycles; a reference register
// with load over shift and zero fill predicts q0 after each rising edge. A
// directed case loads 1011 and checks that q0 gives 1, 1, 0, 1 and then zeros.
module tb_digit_shift_reg;
  localparam int W = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load = 0, shift = 0, q0;
  logic [W-1:0] d = '0, ref_r;

  digit_shift_reg #(.W(W)) dut (.clk, .rst_n, .load, .shift, .d, .q0);
  always #5 clk = ~clk;

  task automatic chk(logic exp, string what);
    checks++;
    if (q0 !== exp) begin failures++; $display("FAIL %s q0=%0b exp %0b", what, q0, exp); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 chk(1'b0, "reset");
    @(negedge clk) rst_n = 1;
    // directed: 1011 shifts out LSB first
    load = 1; d = 4'b1011;
    @(negedge clk) load = 0; shift = 1;
    chk(1'b1, "bit0");
    @(negedge clk) chk(1'b1, "bit1");
    @(negedge clk) chk(1'b0, "bit2");
    @(negedge clk) chk(1'b1, "bit3");
    @(negedge clk) chk(1'b0, "fill");
    @(negedge clk) chk(1'b0, "fill");
    shift = 0;
    ref_r = '0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      load  = ($urandom_range(3) == 0);
      shift = 1'($urandom);
      d     = W'($urandom);
      @(posedge clk);
      if (load) ref_r = d;
      else if (shift) ref_r = ref_r >> 1;
      #1 chk(ref_r[0], "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
