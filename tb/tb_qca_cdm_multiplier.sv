// tb_qca_cdm_multiplier: self-checking testbench of the carry delay
// serial-parallel multiplier at its default width.
//
// The testbench makes its own four-phase zone enables (edge n of clk latches
// zone n mod 4). It streams a series of operations back to back: for each,
// B is applied with the first bit of A, then the N bits of A (LSB first) and
// N zeros follow, one bit per QCA clock (four edges). The expected output
// stream is the 2N-bit product A*B of each operation, LSB first, computed
// here with ordinary arithmetic. At every falling edge p_out is compared with
// the bit that must be there: the bit of step t is loaded by edge 4t+3 (4
// zone steps after it was presented, one QCA clock) and held until edge
// 4t+7, so the check also pins the latency to exactly four zone steps.
module tb_qca_cdm_multiplier;
  import qca_pkg::*;

  localparam int unsigned N       = 32;
  localparam int unsigned LAT     = 4;     // zone steps, 1 QCA clock
  localparam int unsigned N_RAND  = 120;
  localparam int unsigned MAX_EDGES = 200000;

  typedef logic [N-1:0]   word_t;
  typedef logic [2*N-1:0] prod_t;

  logic     clk = 1'b0;
  logic     rst_n;
  zone_en_t zone_en;
  word_t    b;
  logic     a_in, p_out;

  int unsigned checks = 0, failures = 0;
  int unsigned edge_n = 0;

  // per serial step: inputs and expected output bit
  logic  a_bits[$], exp_bits[$];
  word_t b_vals[$];

  qca_cdm_multiplier #(.N(N)) dut (.clk, .rst_n, .zone_en, .b, .a_in, .p_out);

  always #5 clk = ~clk;

  always_comb begin
    zone_en = '0;
    zone_en[edge_n % NUM_ZONES] = 1'b1;
  end

  function automatic word_t rand_word();
    word_t w;
    for (int i = 0; i < N; i++) w[i] = 1'($urandom);
    return w;
  endfunction

  task automatic add_op(input word_t av, input word_t bv);
    prod_t p;
    p = prod_t'(av) * prod_t'(bv);
    for (int k = 0; k < 2 * N; k++) begin
      a_bits.push_back(k < N ? av[k] : 1'b0);
      exp_bits.push_back(p[k]);
      b_vals.push_back(bv);
    end
  endtask

  function automatic logic exp_at(input int m);   // output after edge m
    int s;
    if (m < int'(LAT) - 1) return 1'b0;
    s = (m - (int'(LAT) - 1)) / 4;
    return (s < exp_bits.size()) ? exp_bits[s] : 1'b0;
  endfunction

  always @(posedge clk) if (rst_n) edge_n <= edge_n + 1;

  // drive the step whose capture edge (zone 0) comes next, check the output
  always @(negedge clk) if (rst_n) begin
    int unsigned t;
    if (edge_n % 4 == 0) begin
      t = edge_n / 4;
      if (t < a_bits.size()) begin
        a_in <= a_bits[t]; b <= b_vals[t];
      end else begin
        a_in <= 1'b0;
      end
    end
    if (edge_n > 0) begin
      checks++;
      if (p_out !== exp_at(int'(edge_n) - 1)) begin
        failures++;
        if (failures < 10)
          $display("mismatch after edge %0d: p_out=%0b expected %0b", edge_n - 1, p_out,
                   exp_at(int'(edge_n) - 1));
      end
    end
    if (edge_n == 4 * a_bits.size() + 8) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    word_t ones;
    ones = '1;
    add_op('0, '0);
    add_op(ones, ones);                       // largest product
    add_op(word_t'(1), word_t'(1));
    add_op(ones, word_t'(1));
    add_op(word_t'(1), ones);
    add_op(word_t'(1) << (N - 1), word_t'(1) << (N - 1));
    add_op('0, ones);
    add_op(ones, ones);
    for (int i = 0; i < N_RAND; i++)
      add_op(rand_word(), rand_word());
    rst_n = 1'b0;
    a_in  = a_bits[0];
    b     = b_vals[0];
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
