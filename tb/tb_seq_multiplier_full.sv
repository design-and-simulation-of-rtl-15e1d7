// tb_seq_multiplier_full: the multiplier at its default size (4 x 4 bits),
// taken through every one of the 256 operand pairs with a reset in between
// halves. Each product is checked, and so is the latency: done high at the
// sixth falling edge after start is raised (five rising edges after the one
// that samples start).
module tb_seq_multiplier_full;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       start = 0, busy, done;
  logic [3:0] a = '0, b = '0;
  logic [7:0] product;
  seq_multiplier dut (.clk, .rst_n, .start, .a, .b, .busy, .done, .product);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int half = 0; half < 2; half++) begin
      rst_n = 0;
      repeat (2) @(posedge clk);
      @(negedge clk) rst_n = 1;
      @(negedge clk);
      checks++;
      if (product !== '0 || busy || done) begin failures++; $display("FAIL after reset"); end
      for (int i = half * 128; i < (half + 1) * 128; i++) begin
        int lat;
        a = 4'(i >> 4); b = 4'(i); start = 1;
        @(negedge clk);
        start = 0;
        lat = 1;
        while (!done && lat < 50) begin @(negedge clk); lat++; end
        checks++;
        if (lat != 6) begin failures++; $display("FAIL latency %0d", lat); end
        checks++;
        if (product !== 8'((i >> 4) * (i & 15))) begin
          failures++;
          $display("FAIL %0d*%0d got %0d", i >> 4, i & 15, product);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
