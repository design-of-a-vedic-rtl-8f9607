// vedic_8x8: 8x8-bit unsigned multiplier from four 4x4 Vedic multipliers and
// three 8-bit ripple-carry adders.
//
// The 4x4 multiplier is the building block, one level up the Urdhva-
// Tiryagbhyam recursion. The adder arrangement is that of the 4x4 block with
// every width doubled (this design's choice; only the use of 4x4 blocks is
// prescribed):
//   q0 = aL*bL, q1 = aL*bH, q2 = aH*bL, q3 = aH*bH   (8 bits each, 4-bit halves)
//   RCA1: {ca1, t} = q1 + q2
//   RCA2: {ca2, u} = t + {4'h0, q0[7:4]}
//   RCA3: {ca3, v} = q3 + {3'b000, ca1|ca2, u[7:4]}
//   p = {v, u[3:0], q0[3:0]}
// ca1 and ca2 are never both 1 and ca3 is always 0 (255*255 < 65536);
// assertions check both. Purely combinational.
module vedic_8x8 (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] p
);
  logic [7:0] q0, q1, q2, q3;
  logic [7:0] t, u, v;
  logic       ca1, ca2, ca3;

  vedic_4x4 u_m0 (.a(a[3:0]), .b(b[3:0]), .p(q0));
  vedic_4x4 u_m1 (.a(a[3:0]), .b(b[7:4]), .p(q1));
  vedic_4x4 u_m2 (.a(a[7:4]), .b(b[3:0]), .p(q2));
  vedic_4x4 u_m3 (.a(a[7:4]), .b(b[7:4]), .p(q3));

  rca #(.W(8)) u_rca1 (.x(q1), .y(q2),                          .cin(1'b0), .s(t), .cout(ca1));
  rca #(.W(8)) u_rca2 (.x(t),  .y({4'h0, q0[7:4]}),             .cin(1'b0), .s(u), .cout(ca2));
  rca #(.W(8)) u_rca3 (.x(q3), .y({3'b000, ca1 | ca2, u[7:4]}), .cin(1'b0), .s(v), .cout(ca3));

  assign p = {v, u[3:0], q0[3:0]};

  always_comb begin
    assert (!(ca1 && ca2)) else $error("vedic_8x8: both intermediate carries set");
    assert (!ca3)           else $error("vedic_8x8: product overflowed 16 bits");
  end
endmodule
