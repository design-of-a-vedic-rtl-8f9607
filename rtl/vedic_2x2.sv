// vedic_2x2: 2x2-bit unsigned multiplier after the Urdhva-Tiryagbhyam
// ("vertically and crosswise") rule.
//
//   s0    = a0 b0                  (vertical, least significant bits)
//   c1 s1 = a1 b0 + a0 b1          (crosswise, first half adder)
//   c2 s2 = c1 + a1 b1             (vertical, second half adder)
//   p     = {c2, s2, s1, s0}
//
// Four two-input AND gates and two half adders, as the architecture
// specifies. Purely combinational; the critical path is one AND and two
// half-adder stages.
module vedic_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  logic a0b0, a1b0, a0b1, a1b1;
  logic c1, s1, c2, s2;

  always_comb begin
    a0b0 = a[0] & b[0];
    a1b0 = a[1] & b[0];
    a0b1 = a[0] & b[1];
    a1b1 = a[1] & b[1];
  end

  half_adder u_ha_cross (.x(a0b1), .y(a1b0), .s(s1), .c(c1));
  half_adder u_ha_high  (.x(a1b1), .y(c1),   .s(s2), .c(c2));

  assign p = {c2, s2, s1, a0b0};
endmodule
