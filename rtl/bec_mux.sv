// bec_mux: carry-select stage of one group, s = cin ? bin + 1 : bin.
//
// A W-bit binary to excess-1 converter computes bin + 1 in parallel with the
// arrival of cin; a 2W:W multiplexer (8:4 at the 4-bit default) then passes
// the direct bits on its '0' input or the converter output on its '1' input,
// selected by cin, the carry from the group below. The converter's delay is
// hidden as long as cin arrives later than bin. Purely combinational.
module bec_mux #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] bin,
  input  logic         cin,
  output logic [W-1:0] s
);
  logic [W-1:0] bin_p1;

  bec #(.W(W)) u_bec (.bin(bin), .x(bin_p1));

  always_comb s = cin ? bin_p1 : bin;
endmodule
