// qca_majority_gate: the three-input majority gate, the basic logic gate of
// quantum-dot cellular automata.
//
//   m = M(a,b,c) = a&b | b&c | c&a
//
// Tying one input to a fixed 0 turns it into a two-input AND, M(a,b,0) = a&b;
// tying it to a fixed 1 gives a two-input OR, M(a,b,1) = a|b. The partial
// product gates of the multipliers are such ANDs (the fixed cells of the
// layouts, polarization -1, are the constant 0). Purely combinational; in QCA
// the gate settles within the clock zone that holds it.
module qca_majority_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic m
);

  always_comb m = (a & b) | (b & c) | (c & a);

endmodule
