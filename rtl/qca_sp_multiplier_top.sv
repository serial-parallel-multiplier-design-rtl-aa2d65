// qca_sp_multiplier_top: the two QCA serial-parallel multipliers, carry shift
// (CSM, 1.25 QCA clocks latency) and carry delay (CDM, 1 QCA clock latency),
// side by side under one four-phase clock.
//
// Both multiply a held N-bit word B by a serial word A sent least significant
// bit first, followed by N zeros, and return the 2N-bit product serially,
// least significant bit first. Each multiplier has its own inputs and output;
// they share only the clock, the reset and the phase generator. `phase` tells
// the environment which clock zone latches at the next rising edge of clk:
// present a new serial bit (and the CSM's serial addend) while phase is 0
// and hold it for four edges. The CSM output changes on the zone-0 edge and
// the CDM output on the zone-3 edge; each then stays for four edges.
// One clk edge is one clock phase; the QCA clock is clk divided by four.
module qca_sp_multiplier_top
  import qca_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic [1:0]   phase,
  // carry shift multiplier
  input  logic [N-1:0] csm_b,
  input  logic         csm_a,
  input  logic         csm_cin,
  output logic         csm_p,
  // carry delay multiplier
  input  logic [N-1:0] cdm_b,
  input  logic         cdm_a,
  output logic         cdm_p
);

  zone_en_t zone_en;
  zone_t    phase_q;

  qca_clock_phase u_clock (.clk, .rst_n, .zone_en, .phase(phase_q));
  assign phase = phase_q;

  qca_csm_multiplier #(.N(N)) u_csm (
    .clk, .rst_n, .zone_en, .b(csm_b), .a_in(csm_a), .cin(csm_cin), .p_out(csm_p));

  qca_cdm_multiplier #(.N(N)) u_cdm (
    .clk, .rst_n, .zone_en, .b(cdm_b), .a_in(cdm_a), .p_out(cdm_p));

endmodule
