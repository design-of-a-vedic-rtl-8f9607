// half_adder: one-bit half adder, s = x ^ y and c = x & y.
//
// The sum uses the AND-OR-Inverter XOR (xor_aoi); the carry is a single AND.
// It is the adder cell of the 2x2 Vedic multiplier and, in pairs, of the full
// adder. The gate-level structure is this design's choice; only the cell's
// name and role come from the multiplier architecture. Purely combinational.
module half_adder (
  input  logic x,
  input  logic y,
  output logic s,
  output logic c
);
  xor_aoi u_xor (.a(x), .b(y), .y(s));

  always_comb c = x & y;
endmodule
