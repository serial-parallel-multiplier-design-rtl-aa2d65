// qca_cdm_multiplier: right-to-right carry delay serial-parallel multiplier
// (CDM) for quantum-dot cellular automata.
//
// Function. Same use as the carry shift multiplier: the N-bit multiplicand B
// is held in parallel, the multiplier A enters serially at a_in, least
// significant bit first, one bit per QCA clock, and the product leaves
// serially at p_out, least significant bit first. Send the N bits of A and
// then N zeros; the 2N output bits are the product and the network is empty
// again afterwards, so words can follow back to back (one product every 2N
// QCA clocks).
//
// Network. Column j keeps its own carry for one QCA clock and adds it back
// into itself ("carry delay", a carry-save arrangement), so no carry ever
// crosses a column. In clock-zone steps (D = one zone, D^-4 = one QCA clock):
//
//   (s_j, c_j) = FA( b_j & D^-(2j+2) a,  D^-2 s_(j+1),  D^-4 c_j )
//
// The serial input passes one zone before column 0 and two zones per column
// after that, each partial product AND is followed by one zone, and a sum
// travels two zones to the column below. The top column has nothing to add
// to its partial product, so it has no adder: b_(N-1) & a goes straight on
// to column N-2 (N-1 full adders in all). The sum of column 0 reaches p_out
// through D^-2. These delays are the document's; the zone numbers follow
// from them: a register at distance d from a_in latches in zone (d-1) mod 4.
//
// Timing. a_in is captured when zone 0 latches and is held for the QCA clock
// that starts there. A product bit appears at p_out 4 zone steps (1 QCA
// clock) after its a bit was presented: it is loaded by the zone-3 edge of
// the same QCA clock and is stable for one QCA clock. B must be stable from
// the first bit of A until the last bit of A has reached the top column
// (2N-1 zone steps later); during the trailing zeros it may change. Reset
// clears every zone. N must be at least 2. A concurrent assertion checks
// that exactly one zone is enabled on every edge.
module qca_cdm_multiplier
  import qca_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  zone_en_t     zone_en,
  input  logic [N-1:0] b,
  input  logic         a_in,
  output logic         p_out
);

  logic [N-1:0] a_tap;      // a at column j (distance 2j+1 from a_in)
  logic [N-1:0] pp_comb;    // b_j & a (majority gate with a fixed 0)
  logic [N-1:0] pp;         // partial product after its clock zone
  logic [N-1:0] s;          // column result passed to column j-1
  logic [N-2:0] sum_in;     // sum arriving from column j+1
  logic [N-2:0] carry_q;    // own carry, one QCA clock old
  logic [N-2:0] c;          // full adder carry out

  for (genvar j = 0; j < N; j++) begin : g_col
    if (j == 0) begin : g_a0
      qca_zone_delay #(.DELAY(1), .FIRST_ZONE(zone_after(0))) u_a (
        .clk, .rst_n, .zone_en, .d(a_in), .q(a_tap[0]));
    end else begin : g_aj
      qca_zone_delay #(.DELAY(2), .FIRST_ZONE(zone_after(2 * j - 1))) u_a (
        .clk, .rst_n, .zone_en, .d(a_tap[j-1]), .q(a_tap[j]));
    end

    qca_majority_gate u_and (.a(b[j]), .b(a_tap[j]), .c(1'b0), .m(pp_comb[j]));
    qca_zone_delay #(.DELAY(1), .FIRST_ZONE(zone_after(2 * j + 1))) u_pp (
      .clk, .rst_n, .zone_en, .d(pp_comb[j]), .q(pp[j]));

    if (j == N - 1) begin : g_top
      // no adder in the top column
      assign s[j] = pp[j];
    end else begin : g_add
      qca_zone_delay #(.DELAY(2), .FIRST_ZONE(zone_after(2 * j + 4))) u_s (
        .clk, .rst_n, .zone_en, .d(s[j+1]), .q(sum_in[j]));
      qca_zone_delay #(.DELAY(4), .FIRST_ZONE(zone_after(2 * j + 2))) u_c (
        .clk, .rst_n, .zone_en, .d(c[j]), .q(carry_q[j]));
      qca_full_adder u_fa (
        .x(pp[j]), .y(sum_in[j]), .z(carry_q[j]), .sum(s[j]), .cout(c[j]));
    end
  end

  // the four-phase clock enables exactly one zone per edge, in reset too
  a_zone_onehot: assert property (@(posedge clk) $onehot(zone_en))
    else $error("zone_en %b is not one-hot", zone_en);

  // serial output: D^-2 after column 0, D^-4 from a_in in all
  qca_zone_delay #(.DELAY(2), .FIRST_ZONE(zone_after(2))) u_p (
    .clk, .rst_n, .zone_en, .d(s[0]), .q(p_out));

endmodule
