// qca_csm_multiplier: right-to-right carry shift serial-parallel multiplier
// (CSM) for quantum-dot cellular automata.
//
// Function. The N-bit multiplicand B is applied in parallel and held; the
// multiplier A enters serially at a_in, least significant bit first, one bit
// per QCA clock. The product leaves serially at p_out, least significant bit
// first, one bit per QCA clock. To multiply two N-bit words, send the N bits
// of A followed by N zeros; the 2N output bits are then the whole product,
// and the network is empty again, so the next word can follow at once
// (one product every 2N QCA clocks). cin is a serial addend that enters the
// carry input of the lowest column (the "Cin" pin of the 4-bit layout; the
// network diagram ties it to 0): p = A*B + CIN.
//
// Network. Column j (0 <= j < N) adds the partial product b_j & a, the sum
// of column j+1 from the previous step and the carry of column j-1 from the
// same step. In clock-zone steps (D = one zone, D^-4 = one QCA clock):
//
//   (s_j, c_j) = FA( b_j & D^-(j+2) a,  D^-3 s_(j+1),  D^-1 c_(j-1) )
//
// so a carry travels to the next higher column within one step ("carry
// shift"), skewed by one zone per column along the diagonal that a also
// follows. The top column has no neighbour above; it takes its own carry back
// after one QCA clock (D^-4) in place of a sum. The sum of column 0 reaches
// p_out through D^-3. The serial input passes one zone (D^-1) before column
// 0 and one zone per column after that; each partial product AND is followed
// by one zone. These delays are the ones the document derives; the zone
// numbers below follow from them: a register at distance d from a_in latches
// in zone (d-1) mod 4.
//
// Timing. a_in is captured when zone 0 latches and must be held (with cin)
// for the QCA clock that starts there; cin is used two zone steps later. A
// product bit appears at p_out 5 zone steps (1.25 QCA clocks) after its a
// bit was presented: it is loaded by the zone-0 edge one QCA clock after the
// edge that captured a, and it is stable for one QCA clock. B must be
// stable from the first bit of A until the last bit of A has passed the top
// column (N zone steps later); during the trailing zeros of A it may change. Reset clears every zone. A concurrent assertion checks
// that exactly one zone is enabled on every edge.
module qca_csm_multiplier
  import qca_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  zone_en_t     zone_en,
  input  logic [N-1:0] b,
  input  logic         a_in,
  input  logic         cin,
  output logic         p_out
);

  logic [N-1:0] a_tap;      // a after column j's share of the input wire
  logic [N-1:0] pp_comb;    // b_j & a (majority gate with a fixed 0)
  logic [N-1:0] pp;         // partial product after its clock zone
  logic [N-1:0] sum_in;     // sum arriving from column j+1 (own carry at the top)
  logic [N-1:0] carry_in;   // carry arriving from column j-1 (cin at the bottom)
  logic [N-1:0] s, c;       // full adder outputs

  for (genvar j = 0; j < N; j++) begin : g_col
    // input wire: D^-1 to column 0, then D^-1 per column (a_tap[j] is at j+1)
    if (j == 0) begin : g_a0
      qca_zone_delay #(.DELAY(1), .FIRST_ZONE(zone_after(0))) u_a (
        .clk, .rst_n, .zone_en, .d(a_in), .q(a_tap[0]));
    end else begin : g_aj
      qca_zone_delay #(.DELAY(1), .FIRST_ZONE(zone_after(j))) u_a (
        .clk, .rst_n, .zone_en, .d(a_tap[j-1]), .q(a_tap[j]));
    end

    // partial product b_j a, then one zone: column j works at distance j+2
    qca_majority_gate u_and (.a(b[j]), .b(a_tap[j]), .c(1'b0), .m(pp_comb[j]));
    qca_zone_delay #(.DELAY(1), .FIRST_ZONE(zone_after(j + 1))) u_pp (
      .clk, .rst_n, .zone_en, .d(pp_comb[j]), .q(pp[j]));

    qca_full_adder u_fa (
      .x(pp[j]), .y(sum_in[j]), .z(carry_in[j]), .sum(s[j]), .cout(c[j]));

    // carry shifted to the next column: D^-1
    if (j == 0) begin : g_cin
      assign carry_in[0] = cin;
    end else begin : g_cj
      qca_zone_delay #(.DELAY(1), .FIRST_ZONE(zone_after(j + 1))) u_c (
        .clk, .rst_n, .zone_en, .d(c[j-1]), .q(carry_in[j]));
    end

    // sum passed down from column j+1: D^-3; top column: own carry, D^-4
    if (j == N - 1) begin : g_top
      qca_zone_delay #(.DELAY(4), .FIRST_ZONE(zone_after(j + 2))) u_s (
        .clk, .rst_n, .zone_en, .d(c[j]), .q(sum_in[j]));
    end else begin : g_sj
      qca_zone_delay #(.DELAY(3), .FIRST_ZONE(zone_after(j + 3))) u_s (
        .clk, .rst_n, .zone_en, .d(s[j+1]), .q(sum_in[j]));
    end
  end

  // the four-phase clock enables exactly one zone per edge, in reset too
  a_zone_onehot: assert property (@(posedge clk) $onehot(zone_en))
    else $error("zone_en %b is not one-hot", zone_en);

  // serial output: D^-3 after column 0, D^-5 from a_in in all
  qca_zone_delay #(.DELAY(3), .FIRST_ZONE(zone_after(2))) u_p (
    .clk, .rst_n, .zone_en, .d(s[0]), .q(p_out));

endmodule
