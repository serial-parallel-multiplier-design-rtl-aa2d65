// tb_qca_majority_gate: exhaustive check of the three-input majority gate
// against the sum-of-products M(a,b,c) = ab + bc + ca, and of the AND and OR
// gates made by fixing the third input to 0 or 1.
module tb_qca_majority_gate;

  logic a, b, c, m;
  int unsigned checks = 0, failures = 0;

  qca_majority_gate dut (.a, .b, .c, .m);

  task automatic check(input logic expected, input string what);
    checks++;
    if (m !== expected) begin
      failures++;
      $display("%s: a=%0b b=%0b c=%0b m=%0b expected %0b", what, a, b, c, m, expected);
    end
  endtask

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1 check(($countones(3'(v)) >= 2), "majority");
    end
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v); c = 1'b0;
      #1 check(a & b, "and");
      c = 1'b1;
      #1 check(a | b, "or");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
