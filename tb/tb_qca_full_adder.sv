// tb_qca_full_adder: exhaustive check of the majority-gate full adder
// against integer addition: {cout, sum} must equal x + y + z.
module tb_qca_full_adder;

  logic x, y, z, sum, cout;
  int unsigned checks = 0, failures = 0;

  qca_full_adder dut (.x, .y, .z, .sum, .cout);

  initial begin
    for (int v = 0; v < 8; v++) begin
      {x, y, z} = 3'(v);
      #1;
      checks++;
      if ({cout, sum} !== 2'(int'(x) + int'(y) + int'(z))) begin
        failures++;
        $display("x=%0b y=%0b z=%0b gives cout=%0b sum=%0b", x, y, z, cout, sum);
      end
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
