// tb_timing_control: controller test for N = 4 (three pulses) and N = 8
// (seven pulses). For each run the testbench raises start, then checks the
// control outputs cycle by cycle against the schedule worked out from the
// pulse count P = N-1: pulse for run cycles 0..P-1, SR3 load with index
// c-1 for cycles 1..P, Register2 load for cycles 2..P+1, and done one cycle
// after that: N+2 falling edges after start is raised, which is N+1 rising
// edges after the one that samples it. start is held
// high through some runs to check that it is ignored while busy.
module tb_timing_control;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic s4 = 0, busy4, done4, ld4, pulse4, sr3ld4, acc4;
  logic [1:0] t4;
  timing_control dut4 (.clk, .rst_n, .start(s4), .busy(busy4), .done(done4), .ld(ld4),
                       .pulse(pulse4), .sr3_ld(sr3ld4), .sr3_t(t4), .acc_ld(acc4));

  logic s8 = 0, busy8, done8, ld8, pulse8, sr3ld8, acc8;
  logic [2:0] t8;
  timing_control #(.N(8)) dut8 (.clk, .rst_n, .start(s8), .busy(busy8), .done(done8), .ld(ld8),
                                .pulse(pulse8), .sr3_ld(sr3ld8), .sr3_t(t8), .acc_ld(acc8));

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got %0d exp %0d at %0t", what, got, exp, $time); end
  endtask

  // One run of the N-bit controller; hold_start keeps start high throughout.
  task automatic run(int n, bit hold_start);
    int p, lat;
    p = n - 1;
    @(negedge clk);
    if (n == 4) s4 = 1; else s8 = 1;
    #1;
    chk("ld on start", (n == 4) ? int'(ld4) : int'(ld8), 1);
    chk("idle before", (n == 4) ? int'(busy4) : int'(busy8), 0);
    @(negedge clk);
    if (!hold_start) begin if (n == 4) s4 = 0; else s8 = 0; end
    lat = 1;
    for (int c = 0; c <= p + 1; c++) begin
      #1;
      if (n == 4) begin
        chk("busy", busy4, 1); chk("ld while busy", ld4, 0); chk("done early", done4, 0);
        chk("pulse", pulse4, c < p); chk("sr3_ld", sr3ld4, c >= 1 && c <= p);
        if (c >= 1 && c <= p) chk("sr3_t", t4, c - 1);
        chk("acc_ld", acc4, c >= 2);
      end else begin
        chk("busy", busy8, 1); chk("ld while busy", ld8, 0); chk("done early", done8, 0);
        chk("pulse", pulse8, c < p); chk("sr3_ld", sr3ld8, c >= 1 && c <= p);
        if (c >= 1 && c <= p) chk("sr3_t", t8, c - 1);
        chk("acc_ld", acc8, c >= 2);
      end
      @(negedge clk);
      lat++;
    end
    #1;
    chk("done", (n == 4) ? int'(done4) : int'(done8), 1);
    chk("idle after", (n == 4) ? int'(busy4) : int'(busy8), 0);
    chk("latency", lat, n + 2);
    if (n == 4) s4 = 0; else s8 = 0;
    @(negedge clk);
    #1 chk("done is one cycle", (n == 4) ? int'(done4) : int'(done8), 0);
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    run(4, 0);
    run(4, 1);
    run(8, 0);
    run(8, 1);
    repeat (3) @(negedge clk);
    #1 chk("stays idle", int'(busy4) + int'(busy8) + int'(done4) + int'(done8), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
