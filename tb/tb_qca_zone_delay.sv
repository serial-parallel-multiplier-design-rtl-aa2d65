// tb_qca_zone_delay: checks a wire of three clock zones starting in zone 2
// (zones 2, 3, 0). The testbench makes its own one-hot zone enables, drives
// a random bit that may change at every clk edge, and compares q with a
// software model: the value present at d on the edge when zone 2 latches
// must appear at q after the zone-0 edge two steps later and stay there
// for four edges. Bits that change between the zone-2 edges must not be
// seen. Reset must clear the wire.
module tb_qca_zone_delay;
  import qca_pkg::*;

  localparam int unsigned DELAY = 3;
  localparam int unsigned FIRST = 2;

  logic     clk = 1'b0;
  logic     rst_n;
  zone_en_t zone_en;
  logic     d, q;
  int unsigned checks = 0, failures = 0;
  int unsigned edge_n = 0;
  logic     sampled;       // d as seen by the first zone
  logic     model_q;       // expected q

  qca_zone_delay #(.DELAY(DELAY), .FIRST_ZONE(FIRST)) dut (.clk, .rst_n, .zone_en, .d, .q);

  always #5 clk = ~clk;

  always_comb begin
    zone_en = '0;
    zone_en[edge_n % NUM_ZONES] = 1'b1;
  end

  // reference: zone FIRST samples d, q changes DELAY-1 edges later
  logic hist[$];
  always @(posedge clk) if (rst_n) begin
    if (edge_n % NUM_ZONES == FIRST) sampled = d;
    hist.push_back(sampled);
    if (edge_n % NUM_ZONES == (FIRST + DELAY - 1) % NUM_ZONES && hist.size() >= DELAY)
      model_q = hist[hist.size() - DELAY];
    edge_n <= edge_n + 1;
  end

  always @(negedge clk) if (rst_n && edge_n > 0) begin
    checks++;
    if (q !== model_q) begin
      failures++;
      if (failures < 10) $display("after edge %0d q=%0b expected %0b", edge_n - 1, q, model_q);
    end
    d <= 1'($urandom);
  end

  initial begin
    rst_n = 1'b0; d = 1'b1; sampled = 1'b0; model_q = 1'b0;
    #12;
    checks++;
    if (q !== 1'b0) begin failures++; $display("reset does not clear the wire"); end
    @(negedge clk) rst_n = 1'b1;
    repeat (400) @(posedge clk);
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
