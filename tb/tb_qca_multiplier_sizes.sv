// tb_qca_multiplier_sizes: runs both multipliers at every word size of the
// published results, 4, 8, 16, 32 and 64 bits, side by side under one
// four-phase clock. Each instance of qca_mult_checker streams back-to-back
// operations through its multiplier and checks every output bit and its
// latency (CSM 1.25 QCA clocks, CDM 1 QCA clock); the result line sums them.
module tb_qca_multiplier_sizes;
  import qca_pkg::*;

  localparam int unsigned NSIZES = 5;
  localparam int unsigned SIZES[NSIZES] = '{4, 8, 16, 32, 64};

  logic        clk = 1'b0;
  logic        rst_n;
  zone_en_t    zone_en;
  int unsigned edge_n = 0;

  logic        done   [2*NSIZES];
  int unsigned chk    [2*NSIZES];
  int unsigned fail   [2*NSIZES];

  always #5 clk = ~clk;

  always_comb begin
    zone_en = '0;
    zone_en[edge_n % NUM_ZONES] = 1'b1;
  end

  always @(posedge clk) if (rst_n) edge_n <= edge_n + 1;

  for (genvar i = 0; i < NSIZES; i++) begin : g_size
    qca_mult_checker #(.N(SIZES[i]), .CSM(1'b1), .N_OPS(24)) u_csm (
      .clk, .rst_n, .zone_en, .edge_n,
      .done(done[2*i]), .checks(chk[2*i]), .failures(fail[2*i]));
    qca_mult_checker #(.N(SIZES[i]), .CSM(1'b0), .N_OPS(24)) u_cdm (
      .clk, .rst_n, .zone_en, .edge_n,
      .done(done[2*i+1]), .checks(chk[2*i+1]), .failures(fail[2*i+1]));
  end

  initial begin
    int unsigned checks, failures;
    bit all_done;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    do begin
      @(posedge clk);
      all_done = 1'b1;
      foreach (done[k]) all_done &= done[k];
    end while (!all_done);
    checks = 0;
    failures = 0;
    foreach (chk[k]) begin
      $display("%s-%0d: %0d checks, %0d failures", (k % 2 == 0) ? "CSM" : "CDM",
               SIZES[k/2], chk[k], fail[k]);
      checks += chk[k];
      failures += fail[k];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end

endmodule
