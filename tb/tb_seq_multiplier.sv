// tb_seq_multiplier: end-to-end test of the sequential multiplier.
//
// The 4-bit multiplier (default size) gets every one of the 256 operand
// pairs, then 200 random pairs issued back to back, some with start held high
// through the whole run; an 8-bit instance gets 1000 random pairs plus the
// corner cases. Each product is compared with the integer product, and the
// latency is checked: done must be high at the (N+2)th falling edge after
// start is raised, i.e. N+1 rising edges after the one that samples start.
//
// It also counts, by watching the 4-bit datapath, how often each mechanism
// of the design happened and fails if one never did: a sum entering SR3
// unshifted, shifted two places and shifted four places; a pulse on which
// both multipliers contribute to RCA1; an accumulation in which Register2's
// fed-back value is non-zero; the A digit passed on to the second multiplier;
// start ignored while busy; a start taken on the cycle right after done.
module tb_seq_multiplier;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // ---------------- 4-bit (default) ----------------
  logic       st4 = 0, busy4, done4;
  logic [3:0] a4 = '0, b4 = '0;
  logic [7:0] p4;
  seq_multiplier dut4 (.clk, .rst_n, .start(st4), .a(a4), .b(b4), .busy(busy4), .done(done4), .product(p4));

  // ---------------- 8-bit ----------------
  logic        st8 = 0, busy8, done8;
  logic [7:0]  a8 = '0, b8 = '0;
  logic [15:0] p8;
  seq_multiplier #(.N(8)) dut8 (.clk, .rst_n, .start(st8), .a(a8), .b(b8), .busy(busy8), .done(done8), .product(p8));

  // ---------------- mechanism counters (4-bit datapath) ----------------
  int n_shift [3] = '{0, 0, 0};
  int n_both = 0, n_feedback = 0, n_apass = 0, n_ignored = 0, n_b2b = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut4.sr3_ld && dut4.rca1_sum != 0) n_shift[dut4.sr3_t]++;
    if (dut4.sr3_ld && dut4.preg[0] != 0 && dut4.preg[1] != 0) n_both++;
    if (dut4.acc_ld && dut4.acc_q != 0 && dut4.sr3_q != 0) n_feedback++;
    if (dut4.pulse && dut4.a_dig[1] != 0) n_apass++;
    if (st4 && busy4) n_ignored++;
  end

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0d exp %0d at %0t", what, got, exp, $time);
    end
  endtask

  // One multiplication on the 4-bit unit. Starts at a falling edge.
  task automatic mul4(logic [3:0] a, logic [3:0] b, bit hold_start);
    int lat;
    if (busy4) begin failures++; $display("FAIL busy at start"); end
    a4 = a; b4 = b; st4 = 1;
    @(negedge clk);
    if (!hold_start) st4 = 0;
    a4 = 4'($urandom); b4 = 4'($urandom);    // operands must have been sampled
    lat = 1;
    while (!done4 && lat < 50) begin @(negedge clk); lat++; end
    st4 = 0;
    chk("latency N=4", lat, 6);
    chk($sformatf("%0d*%0d", a, b), p4, int'(a) * int'(b));
  endtask

  task automatic mul8(logic [7:0] a, logic [7:0] b);
    int lat;
    a8 = a; b8 = b; st8 = 1;
    @(negedge clk);
    st8 = 0;
    a8 = 8'($urandom); b8 = 8'($urandom);
    lat = 1;
    while (!done8 && lat < 50) begin @(negedge clk); lat++; end
    chk("latency N=8", lat, 10);
    chk($sformatf("%0d*%0d", a, b), p8, int'(a) * int'(b));
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(negedge clk);

    // exhaustive, with an idle cycle between operations
    for (int i = 0; i < 256; i++) begin
      mul4(4'(i >> 4), 4'(i), 0);
      @(negedge clk);
    end
    // back to back: start again in the cycle where done is high
    for (int i = 0; i < 200; i++) begin
      if (done4) n_b2b++;
      mul4(4'($urandom), 4'($urandom), (i % 5) == 0);
    end
    // the product holds after done
    repeat (3) @(negedge clk);
    chk("product holds", p4, dut4.acc_q);

    // 8-bit
    mul8(8'hFF, 8'hFF);
    mul8(8'h00, 8'hA5);
    mul8(8'h80, 8'h01);
    for (int i = 0; i < 1000; i++) mul8(8'($urandom), 8'($urandom));

    for (int t = 0; t < 3; t++) begin
      checks++;
      if (n_shift[t] == 0) begin failures++; $display("FAIL SR3 shift by %0d never seen", 2*t); end
    end
    checks++; if (n_both == 0)     begin failures++; $display("FAIL two products never summed"); end
    checks++; if (n_feedback == 0) begin failures++; $display("FAIL Register2 feedback never used"); end
    checks++; if (n_apass == 0)    begin failures++; $display("FAIL A digit never passed on"); end
    checks++; if (n_ignored == 0)  begin failures++; $display("FAIL start while busy never seen"); end
    checks++; if (n_b2b == 0)      begin failures++; $display("FAIL back-to-back start never seen"); end
    $display("mechanisms: shift0=%0d shift2=%0d shift4=%0d both=%0d feedback=%0d apass=%0d ignored=%0d b2b=%0d",
             n_shift[0], n_shift[1], n_shift[2], n_both, n_feedback, n_apass, n_ignored, n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
