// qca_full_adder: one-bit full adder made only of what QCA offers, three
// majority gates and two inverters.
//
//   cout = M(x, y, z)
//   sum  = M(~cout, z, M(x, y, ~z))
//
// The multiplier networks only name this cell "Addition" / "FA"; the
// three-majority arrangement is this design's choice, picked because it is the
// smallest full adder that uses majority gates and inverters alone.
// Combinational: in the multipliers it sits between two clock zones.
module qca_full_adder (
  input  logic x,     // addend
  input  logic y,     // addend
  input  logic z,     // carry in
  output logic sum,
  output logic cout
);

  logic z_n, cout_n, m_xy;

  assign z_n    = ~z;
  assign cout_n = ~cout;

  qca_majority_gate u_carry (.a(x),      .b(y), .c(z),    .m(cout));
  qca_majority_gate u_mid   (.a(x),      .b(y), .c(z_n),  .m(m_xy));
  qca_majority_gate u_sum   (.a(cout_n), .b(z), .c(m_xy), .m(sum));

endmodule
