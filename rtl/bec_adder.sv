// bec_adder: W-bit carry-select adder in which a binary to excess-1
// converter (BEC) replaces the second ripple-carry adder of every group.
//
// A regular carry-select adder computes each group twice, with carry-in 0
// and 1, and picks one with the carry from below. Here each group of n bits
// (n = 2, 2, 3, 4, 5, ... from the bottom, see bec_adder_pkg) has a single
// n-bit ripple-carry adder with carry-in 0; its (n+1)-bit result {carry, sum}
// is the carry-in-0 answer, and an (n+1)-bit BEC turns it into the
// carry-in-1 answer, which is exactly that result plus one. A mux driven by
// the previous group's carry picks one, giving the group's sum bits and its
// carry-out. The bottom group is a plain ripple-carry adder fed by cin.
// All groups compute in parallel; the carry crosses one mux per group.
// Interface: {cout, s} = x + y + cin. Purely combinational.
module bec_adder
  import bec_adder_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  localparam int unsigned NG = num_groups(W);

  // carry[g] is the carry into group g; carry[NG] is the adder's carry-out.
  logic [NG:0] carry;

  assign carry[0] = cin;

  for (genvar g = 0; g < NG; g++) begin : g_grp
    localparam int unsigned LO = grp_lo(g);
    localparam int unsigned SZ = grp_size(g, W);

    if (g == 0) begin : g_rca
      rca #(.W(SZ)) u_rca (
        .x(x[LO +: SZ]), .y(y[LO +: SZ]), .cin(carry[0]),
        .s(s[LO +: SZ]), .cout(carry[1])
      );
    end else begin : g_sel
      logic [SZ-1:0] sum0;
      logic          cout0;

      rca #(.W(SZ)) u_rca (
        .x(x[LO +: SZ]), .y(y[LO +: SZ]), .cin(1'b0),
        .s(sum0), .cout(cout0)
      );

      bec_mux #(.W(SZ + 1)) u_sel (
        .bin({cout0, sum0}), .cin(carry[g]),
        .s({carry[g+1], s[LO +: SZ]})
      );
    end
  end

  assign cout = carry[NG];
endmodule
