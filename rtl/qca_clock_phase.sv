// qca_clock_phase: four-phase clock of the QCA circuit.
//
// A QCA wire is divided into clock zones numbered 0..3 in the direction the
// signal travels; the zones are switched in turn so that a value moves one
// zone per phase. Here each rising edge of `clk` is one phase: `phase` names
// the zone that latches at the next edge and `zone_en` is the same as a
// one-hot vector. After reset zone 0 is the first to latch. Four edges make
// one QCA clock.
module qca_clock_phase
  import qca_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  output zone_en_t zone_en,
  output zone_t    phase
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) phase <= '0;
    else        phase <= phase + 1'b1;
  end

  always_comb begin
    zone_en        = '0;
    zone_en[phase] = 1'b1;
  end

endmodule
