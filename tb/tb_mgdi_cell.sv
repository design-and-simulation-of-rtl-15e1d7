// tb_mgdi_cell: checks the MGDI cell against its gate table.
// For every value of the signals A, B, C the cell is wired in each of the six
// table configurations (F1, F2, OR, AND, MUX, NOT) and its output compared
// with the Boolean function that configuration should give. Combinational;
// the watchdog only guards against a hang.
module tb_mgdi_cell;
  int checks = 0, failures = 0;
  logic A, B, C;
  logic o_f1, o_f2, o_or, o_and, o_mux, o_not;

  // Table configurations: (N, P, G)
  mgdi_cell u_f1  (.g(A), .p(B),    .n(1'b0), .out(o_f1));
  mgdi_cell u_f2  (.g(A), .p(1'b1), .n(B),    .out(o_f2));
  mgdi_cell u_or  (.g(A), .p(B),    .n(1'b1), .out(o_or));
  mgdi_cell u_and (.g(A), .p(1'b0), .n(B),    .out(o_and));
  mgdi_cell u_mux (.g(A), .p(B),    .n(C),    .out(o_mux));
  mgdi_cell u_not (.g(A), .p(1'b1), .n(1'b0), .out(o_not));

  task automatic chk(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s A=%0b B=%0b C=%0b got %0b exp %0b", what, A, B, C, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {A, B, C} = 3'(v);
      #1;
      chk("F1",  o_f1,  !A && B);
      chk("F2",  o_f2,  !A || B);
      chk("OR",  o_or,  A || B);
      chk("AND", o_and, A && B);
      chk("MUX", o_mux, (!A && B) || (A && C));
      chk("NOT", o_not, !A);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
