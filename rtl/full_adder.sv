// full_adder: one-bit full adder from two half adders and an OR gate.
//
// The first half adder adds x and y, the second adds the carry-in to that
// partial sum, and the two half-adder carries are OR-ed (they are never both
// 1) into the carry-out. It is the cell of the ripple-carry adders. The
// structure is this design's choice. Purely combinational.
module full_adder (
  input  logic x,
  input  logic y,
  input  logic ci,
  output logic s,
  output logic co
);
  logic p, g1, g2;

  half_adder u_ha0 (.x(x), .y(y),  .s(p), .c(g1));
  half_adder u_ha1 (.x(p), .y(ci), .s(s), .c(g2));

  always_comb co = g1 | g2;
endmodule
