// vedic_4x4: 4x4-bit unsigned multiplier from four 2x2 Vedic multipliers and
// three 4-bit ripple-carry adders.
//
// The operands are split into halves, aH = a[3:2], aL = a[1:0] (same for b),
// and the four 2x2 blocks form the vertical and crosswise products
//   q0 = aL*bL, q1 = aL*bH, q2 = aH*bL, q3 = aH*bH   (4 bits each).
// Then, as in the block diagram of the architecture:
//   RCA1: {ca1, t} = q1 + q2                  the two crosswise products
//   RCA2: {ca2, u} = t + {2'b00, q0[3:2]}     two zero inputs on top
//   RCA3: {ca3, v} = q3 + {1'b0, ca1|ca2, u[3:2]}
//   p = {v, u[1:0], q0[1:0]}                  S7..S4, S3 S2, S1 S0
// The diagram does not say where ca2 goes. Its weight is bit 2 of RCA3, the
// same as ca1, and the two are never 1 together (ca1 = 1 leaves t <= 2, so
// t + q0[3:2] cannot overflow), so an OR gate adds them exactly. ca3 is always
// 0 because 15*15 < 256; an assertion checks it. This mirrors equations
// S0 = A0B0 ... C6S6 = C5 + A3B3 of the column-wise rule.
// Purely combinational.
module vedic_4x4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);
  logic [3:0] q0, q1, q2, q3;
  logic [3:0] t, u, v;
  logic       ca1, ca2, ca3;

  vedic_2x2 u_m0 (.a(a[1:0]), .b(b[1:0]), .p(q0));
  vedic_2x2 u_m1 (.a(a[1:0]), .b(b[3:2]), .p(q1));
  vedic_2x2 u_m2 (.a(a[3:2]), .b(b[1:0]), .p(q2));
  vedic_2x2 u_m3 (.a(a[3:2]), .b(b[3:2]), .p(q3));

  rca #(.W(4)) u_rca1 (.x(q1), .y(q2),                       .cin(1'b0), .s(t), .cout(ca1));
  rca #(.W(4)) u_rca2 (.x(t),  .y({2'b00, q0[3:2]}),         .cin(1'b0), .s(u), .cout(ca2));
  rca #(.W(4)) u_rca3 (.x(q3), .y({1'b0, ca1 | ca2, u[3:2]}), .cin(1'b0), .s(v), .cout(ca3));

  assign p = {v, u[1:0], q0[1:0]};

  always_comb begin
    assert (!(ca1 && ca2)) else $error("vedic_4x4: both intermediate carries set");
    assert (!ca3)           else $error("vedic_4x4: product overflowed 8 bits");
  end
endmodule
