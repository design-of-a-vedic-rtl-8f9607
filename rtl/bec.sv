// bec: W-bit binary to excess-1 converter, x = bin + 1 (mod 2^W).
//
//   X0 = ~B0
//   Xi = Bi ^ (B0 & B1 & ... & B(i-1))     for i >= 1
// The AND terms form a chain (each stage ANDs one more bit onto the previous
// term), and every XOR is the AND-OR-Inverter XOR. The 4-bit default is the
// converter of the architecture (0000 -> 0001, ..., 1110 -> 1111,
// 1111 -> 0000); the carry-select adder instantiates it at n+1 bits to stand
// in for an n-bit ripple-carry adder with carry-in 1. It needs far fewer
// gates than that adder. Purely combinational.
module bec #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] bin,
  output logic [W-1:0] x
);
  // all_ones[i] = &bin[i:0]; the top bit's term would feed nothing.
  logic [W-2:0] all_ones;

  if (W < 2) begin : g_bad_width
    $error("bec: W must be at least 2");
  end

  assign all_ones[0] = bin[0];
  assign x[0]        = ~bin[0];

  for (genvar i = 1; i < W; i++) begin : g_bit
    if (i < W - 1) begin : g_and
      assign all_ones[i] = all_ones[i-1] & bin[i];
    end
    xor_aoi u_xor (.a(bin[i]), .b(all_ones[i-1]), .y(x[i]));
  end
endmodule
