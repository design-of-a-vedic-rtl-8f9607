// xor_aoi: two-input exclusive OR built only from AND, OR and inverter gates.
//
// Y = (A & ~B) | (~A & B): two inverters, two AND gates and one OR gate, three
// gate levels deep. This is the AND-OR-Inverter XOR used as the unit-delay,
// unit-area reference when the adders of this multiplier are costed, and it is
// the XOR used by every half adder, full adder and binary-to-excess-1
// converter in the design. Purely combinational.
module xor_aoi (
  input  logic a,
  input  logic b,
  output logic y
);
  logic a_n, b_n;
  logic t_ab_n, t_an_b;

  always_comb begin
    a_n    = ~a;
    b_n    = ~b;
    t_ab_n = a & b_n;
    t_an_b = a_n & b;
    y      = t_ab_n | t_an_b;
  end
endmodule
