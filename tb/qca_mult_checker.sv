// qca_mult_checker: testbench helper that runs one multiplier of width N
// (carry shift when CSM is 1, carry delay when 0) through N_OPS back-to-back
// random operations plus the extreme operands, and compares its serial output
// at every falling clock edge with A*B (+ CIN for the carry shift kind),
// computed with ordinary arithmetic. The output bit of serial step t must
// appear exactly LAT zone steps after that step's input (5 for CSM, 4 for
// CDM). The zone enables come from the enclosing testbench (zone n mod 4 on
// edge n); `done` rises when the last product bit has been checked.
module qca_mult_checker
  import qca_pkg::*;
#(
  parameter int unsigned N     = 4,
  parameter bit          CSM   = 1'b1,
  parameter int unsigned N_OPS = 20
) (
  input  logic        clk,
  input  logic        rst_n,
  input  zone_en_t    zone_en,
  input  int unsigned edge_n,
  output logic        done,
  output int unsigned checks,
  output int unsigned failures
);

  localparam int LAT = CSM ? 5 : 4;

  typedef logic [N-1:0]   word_t;
  typedef logic [2*N-1:0] prod_t;

  word_t b;
  logic  a_in, cin, p_out;
  logic  a_bits[$], cin_bits[$], exp_bits[$];
  word_t b_vals[$];

  if (CSM) begin : g_csm
    qca_csm_multiplier #(.N(N)) dut (.clk, .rst_n, .zone_en, .b, .a_in, .cin, .p_out);
  end else begin : g_cdm
    qca_cdm_multiplier #(.N(N)) dut (.clk, .rst_n, .zone_en, .b, .a_in, .p_out);
  end

  function automatic word_t rand_word();
    word_t w;
    for (int i = 0; i < N; i++) w[i] = 1'($urandom);
    return w;
  endfunction

  task automatic add_op(input word_t av, input word_t bv, input word_t cv);
    prod_t p;
    p = prod_t'(av) * prod_t'(bv) + prod_t'(cv);
    for (int k = 0; k < 2 * N; k++) begin
      a_bits.push_back(k < N ? av[k] : 1'b0);
      cin_bits.push_back(k < N ? cv[k] : 1'b0);
      exp_bits.push_back(p[k]);
      b_vals.push_back(bv);
    end
  endtask

  function automatic logic exp_at(input int m);
    int s;
    if (m < LAT - 1) return 1'b0;
    s = (m - (LAT - 1)) / 4;
    return (s < exp_bits.size()) ? exp_bits[s] : 1'b0;
  endfunction

  initial begin
    word_t ones;
    ones     = '1;
    checks   = 0;
    failures = 0;
    done     = 1'b0;
    add_op(ones, ones, CSM ? ones : '0);
    add_op(ones, ones, '0);
    add_op(word_t'(1) << (N - 1), ones, '0);
    for (int i = 0; i < N_OPS; i++)
      add_op(rand_word(), rand_word(), (CSM && i % 2 == 1) ? rand_word() : '0);
    a_in = a_bits[0];
    cin  = cin_bits[0];
    b    = b_vals[0];
  end

  always @(negedge clk) if (rst_n && !done) begin
    int unsigned t;
    if (edge_n % 4 == 0) begin
      t = edge_n / 4;
      if (t < a_bits.size()) begin
        a_in <= a_bits[t]; cin <= cin_bits[t]; b <= b_vals[t];
      end else begin
        a_in <= 1'b0; cin <= 1'b0;
      end
    end
    if (edge_n > 0) begin
      checks <= checks + 1;
      if (p_out !== exp_at(int'(edge_n) - 1)) begin
        failures <= failures + 1;
        if (failures < 5)
          $display("%s-%0d after edge %0d: %0b expected %0b", CSM ? "CSM" : "CDM", N,
                   edge_n - 1, p_out, exp_at(int'(edge_n) - 1));
      end
    end
    if (edge_n == 4 * a_bits.size() + 8) done <= 1'b1;
  end

endmodule
