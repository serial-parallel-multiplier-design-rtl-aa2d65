// qca_zone_delay: a QCA wire that spans DELAY clock zones (the D^-DELAY
// operator of the multiplier networks).
//
// In QCA a wire is not a free connection: each clock zone it crosses latches
// the signal when its clock phase is active, so a wire of DELAY zones is a
// chain of DELAY registers. Register m of the chain belongs to zone
// (FIRST_ZONE + m) mod 4 and loads only when that zone's bit of the one-hot
// `zone_en` is set. A value entering at `d` therefore reaches `q` DELAY zone
// steps (DELAY/4 QCA clocks) later and then stays for one full QCA clock.
// All registers clear to 0 on reset, the value a QCA wire holds when the
// multipliers start with an empty pipeline.
module qca_zone_delay
  import qca_pkg::*;
#(
  parameter int unsigned DELAY      = 1,
  parameter int unsigned FIRST_ZONE = 0
) (
  input  logic     clk,
  input  logic     rst_n,
  input  zone_en_t zone_en,
  input  logic     d,
  output logic     q
);

  logic [DELAY-1:0] stage;

  for (genvar m = 0; m < DELAY; m++) begin : g_zone
    localparam int unsigned ZONE = (FIRST_ZONE + m) % NUM_ZONES;
    logic nxt;
    if (m == 0) begin : g_first
      assign nxt = d;
    end else begin : g_next
      assign nxt = stage[m-1];
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)             stage[m] <= 1'b0;
      else if (zone_en[ZONE]) stage[m] <= nxt;
    end
  end

  assign q = stage[DELAY-1];

endmodule
