// tb_qca_clock_phase: checks that the phase generator starts at zone 0 after
// reset, steps 0,1,2,3,0,... one zone per clk edge, keeps zone_en one-hot and
// equal to the decoded phase, and restarts at zone 0 on a reset in the middle.
module tb_qca_clock_phase;
  import qca_pkg::*;

  logic     clk = 1'b0;
  logic     rst_n;
  zone_en_t zone_en;
  zone_t    phase;
  int unsigned checks = 0, failures = 0;
  int unsigned expected;

  qca_clock_phase dut (.clk, .rst_n, .zone_en, .phase);

  always #5 clk = ~clk;

  task automatic check_state();
    checks++;
    if (phase !== zone_t'(expected) || zone_en !== zone_en_t'(1 << expected)) begin
      failures++;
      $display("phase=%0d zone_en=%b expected zone %0d", phase, zone_en, expected);
    end
  endtask

  initial begin
    rst_n = 1'b0;
    #12;
    expected = 0;
    check_state();
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 37; i++) begin
      @(negedge clk);
      expected = (expected + 1) % NUM_ZONES;
      check_state();
    end
    rst_n = 1'b0;
    #1;
    expected = 0;
    check_state();
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 9; i++) begin
      @(negedge clk);
      expected = (expected + 1) % NUM_ZONES;
      check_state();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
