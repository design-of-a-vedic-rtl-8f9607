// rca: W-bit ripple-carry adder, {cout, s} = x + y + cin.
//
// A chain of W full adders; bit i's carry-out feeds bit i+1. The 4x4 Vedic
// multiplier uses three 4-bit instances (the default width), the 8x8 uses
// 8-bit ones, and every group of the BEC carry-select adder uses one with
// cin tied to 0. The delay grows linearly with W. Purely combinational.
module rca #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  logic [W:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (.x(x[i]), .y(y[i]), .ci(c[i]), .s(s[i]), .co(c[i+1]));
  end

  assign cout = c[W];
endmodule
