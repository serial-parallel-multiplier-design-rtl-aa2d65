// tb_qca_sp_multiplier_top: end-to-end test of the two QCA serial-parallel
// multipliers at their default width (N = 32), with the top's parameters
// left alone.
//
// The phase generator inside the top sets the rhythm: whenever `phase`
// says zone 0 latches next, the testbench presents the next serial bit to
// each multiplier. Both get a stream of back-to-back operations (N bits of A,
// LSB first, then N zeros; B changes with the first bit of every operation);
// the carry shift multiplier also gets a serial addend on csm_cin. The
// expected streams, A*B + CIN and A*B, are computed with ordinary
// arithmetic and compared with csm_p and cdm_p at every falling clock edge,
// which also pins the latencies to 5 zone steps (1.25 QCA clocks) and 4 zone
// steps (1 QCA clock). The testbench counts how often each mechanism of the
// design was used and fails if one never was: all four clock zones, the
// carry moving between CSM columns, the CSM top column taking its own carry
// back, the serial carry-in, the CDM columns taking their delayed carry back,
// back-to-back operations and a change of B between operations.
module tb_qca_sp_multiplier_top;

  localparam int unsigned N         = 32;   // the top's default width
  localparam int unsigned N_OPS     = 100;
  localparam int unsigned MAX_EDGES = 200000;

  typedef logic [N-1:0]   word_t;
  typedef logic [2*N-1:0] prod_t;

  logic       clk = 1'b0;
  logic       rst_n;
  logic [1:0] phase;
  word_t      csm_b, cdm_b;
  logic       csm_a, csm_cin, csm_p, cdm_a, cdm_p;

  int unsigned checks = 0, failures = 0;
  int unsigned edge_n = 0;

  logic  csm_a_bits[$], csm_cin_bits[$], csm_exp[$];
  logic  cdm_a_bits[$], cdm_exp[$];
  word_t csm_b_vals[$], cdm_b_vals[$];

  // mechanism counters
  int unsigned zone_hits[4];
  int unsigned n_carry_shift = 0, n_top_feedback = 0, n_cin = 0, n_carry_delay = 0;
  int unsigned n_ops = 0, n_b_change = 0;

  qca_sp_multiplier_top dut (
    .clk, .rst_n, .phase,
    .csm_b, .csm_a, .csm_cin, .csm_p,
    .cdm_b, .cdm_a, .cdm_p);

  always #5 clk = ~clk;

  function automatic word_t rand_word();
    word_t w;
    for (int i = 0; i < N; i++) w[i] = 1'($urandom);
    return w;
  endfunction

  task automatic add_ops(input word_t ca, input word_t cb, input word_t cc,
                         input word_t da, input word_t db);
    prod_t pc, pd;
    pc = prod_t'(ca) * prod_t'(cb) + prod_t'(cc);
    pd = prod_t'(da) * prod_t'(db);
    if (n_ops > 0 && (cb != csm_b_vals[$] || db != cdm_b_vals[$])) n_b_change++;
    for (int k = 0; k < 2 * N; k++) begin
      csm_a_bits.push_back(k < N ? ca[k] : 1'b0);
      csm_cin_bits.push_back(k < N ? cc[k] : 1'b0);
      csm_exp.push_back(pc[k]);
      csm_b_vals.push_back(cb);
      cdm_a_bits.push_back(k < N ? da[k] : 1'b0);
      cdm_exp.push_back(pd[k]);
      cdm_b_vals.push_back(db);
    end
    n_ops++;
    if (cc != '0) n_cin++;
  endtask

  // expected output bit after edge m for a multiplier of latency lat
  function automatic logic exp_at(input int m, input int lat, input logic q[$]);
    int s;
    if (m < lat - 1) return 1'b0;
    s = (m - (lat - 1)) / 4;
    return (s < q.size()) ? q[s] : 1'b0;
  endfunction

  always @(posedge clk) if (rst_n) begin
    zone_hits[phase]++;
    if (dut.u_csm.carry_in[N-1:1] != '0) n_carry_shift++;
    if (dut.u_csm.sum_in[N-1])           n_top_feedback++;
    if (dut.u_cdm.carry_q != '0)         n_carry_delay++;
    edge_n <= edge_n + 1;
  end

  always @(negedge clk) if (rst_n) begin
    int unsigned t;
    logic ec, ed;
    checks++;
    if (phase !== 2'(edge_n % 4)) begin
      failures++;
      $display("phase %0d where zone %0d latches next", phase, edge_n % 4);
    end
    if (phase == 2'd0) begin
      t = edge_n / 4;
      if (t < csm_a_bits.size()) begin
        csm_a <= csm_a_bits[t]; csm_cin <= csm_cin_bits[t]; csm_b <= csm_b_vals[t];
        cdm_a <= cdm_a_bits[t]; cdm_b <= cdm_b_vals[t];
      end else begin
        csm_a <= 1'b0; csm_cin <= 1'b0; cdm_a <= 1'b0;
      end
    end
    if (edge_n > 0) begin
      ec = exp_at(int'(edge_n) - 1, 5, csm_exp);
      ed = exp_at(int'(edge_n) - 1, 4, cdm_exp);
      checks += 2;
      if (csm_p !== ec) begin
        failures++;
        if (failures < 10) $display("CSM after edge %0d: %0b expected %0b", edge_n - 1, csm_p, ec);
      end
      if (cdm_p !== ed) begin
        failures++;
        if (failures < 10) $display("CDM after edge %0d: %0b expected %0b", edge_n - 1, cdm_p, ed);
      end
    end
    if (edge_n == 4 * csm_a_bits.size() + 8) finish_test();
  end

  task automatic need(input string what, input int unsigned count);
    $display("%-34s %0d", what, count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("  never happened");
    end
  endtask

  task automatic finish_test();
    for (int z = 0; z < 4; z++) need($sformatf("zone %0d latched", z), zone_hits[z]);
    need("CSM carry shifted to next column", n_carry_shift);
    need("CSM top column own carry back", n_top_feedback);
    need("CSM operations with serial cin", n_cin);
    need("CDM delayed carry added back", n_carry_delay);
    need("back-to-back operations", n_ops - 1);
    need("B changed between operations", n_b_change);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    word_t ones;
    ones = '1;
    add_ops(ones, ones, '0, ones, ones);
    add_ops(ones, ones, ones, word_t'(1), ones);
    add_ops('0, '0, '0, '0, '0);
    for (int i = 0; i < N_OPS; i++)
      add_ops(rand_word(), rand_word(), (i % 3 == 0) ? rand_word() : '0,
              rand_word(), rand_word());
    rst_n   = 1'b0;
    csm_a   = csm_a_bits[0]; csm_cin = csm_cin_bits[0]; csm_b = csm_b_vals[0];
    cdm_a   = cdm_a_bits[0]; cdm_b = cdm_b_vals[0];
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
  end

  initial begin
    repeat (MAX_EDGES) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
