// vm16x16_beca: 16x16-bit unsigned Vedic multiplier with BEC adders,
// c = a * b.
//
// Urdhva-Tiryagbhyam ("vertically and crosswise") split into 8-bit halves:
//   q0 = aL*bL   q1 = aH*bL   q2 = aL*bH   q3 = aH*bH   (four vedic_8x8)
//   a*b = q3<<16 + (q1 + q2)<<8 + q0
// The low byte of q0 is already final: c[7:0] = q0[7:0]. Three carry-select
// adders with binary to excess-1 converters (bec_adder) sum the rest:
//   left  (16 bit): l = q3 + q1[15:8]          -> L = {l, q1[7:0]}   24 bits
//   right (16 bit): r = q2 + q0[15:8]          -> R = r              16 bits
//   final (24 bit): c[31:8] = L + R
// The pairing (the two products with aH on one adder, the two with aL on the
// other, then one adder for c[31:8]) follows the block diagram of the
// multiplier; the adder widths are this design's choice. None of the three
// adders can carry out for 16-bit operands (255*255 + 255 < 2^16 and the
// product < 2^32); assertions check that.
// Interface: a, b in, c out. Purely combinational, no clock or reset; the
// longest path runs through one 8x8 multiplier and two BEC adders.
module vm16x16_beca (
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [31:0] c
);
  logic [15:0] q0, q1, q2, q3;
  logic [15:0] l, r;
  logic [23:0] hi;
  logic        co_l, co_r, co_f;

  vedic_8x8 u_vm_hh (.a(a[15:8]), .b(b[15:8]), .p(q3));
  vedic_8x8 u_vm_hl (.a(a[15:8]), .b(b[7:0]),  .p(q1));
  vedic_8x8 u_vm_lh (.a(a[7:0]),  .b(b[15:8]), .p(q2));
  vedic_8x8 u_vm_ll (.a(a[7:0]),  .b(b[7:0]),  .p(q0));

  bec_adder #(.W(16)) u_add_left (
    .x(q3), .y({8'h00, q1[15:8]}), .cin(1'b0), .s(l), .cout(co_l)
  );

  bec_adder #(.W(16)) u_add_right (
    .x(q2), .y({8'h00, q0[15:8]}), .cin(1'b0), .s(r), .cout(co_r)
  );

  bec_adder #(.W(24)) u_add_final (
    .x({l, q1[7:0]}), .y({8'h00, r}), .cin(1'b0), .s(hi), .cout(co_f)
  );

  assign c = {hi, q0[7:0]};

  always_comb begin
    assert (!co_l) else $error("vm16x16_beca: left adder carried out");
    assert (!co_r) else $error("vm16x16_beca: right adder carried out");
    assert (!co_f) else $error("vm16x16_beca: final adder carried out");
  end
endmodule
