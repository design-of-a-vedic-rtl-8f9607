// tb_bec_adder: self-check of the BEC carry-select adder at its 16-bit
// default, at 24 bits (the width of the multiplier's final adder) and at
// 5 bits (two groups, tested exhaustively). The wide adders get corner cases
// and random operands, compared with integer addition. For the 16-bit adder
// the test counts, per group above the first, how often the converter output
// (carry-in 1) and the direct output (carry-in 0) were selected, and fails
// if either never was.
module tb_bec_adder;
  import bec_adder_pkg::*;

  localparam int unsigned NG16 = num_groups(16);

  logic [15:0] x16, y16, s16;
  logic [23:0] x24, y24, s24;
  logic [4:0]  x5, y5, s5;
  logic        ci16, co16, ci24, co24, ci5, co5;
  int checks = 0, failures = 0;
  int n_sel1 [NG16];
  int n_sel0 [NG16];

  bec_adder               dut16 (.x(x16), .y(y16), .cin(ci16), .s(s16), .cout(co16));
  bec_adder #(.W(24))     dut24 (.x(x24), .y(y24), .cin(ci24), .s(s24), .cout(co24));
  bec_adder #(.W(5))      dut5  (.x(x5),  .y(y5),  .cin(ci5),  .s(s5),  .cout(co5));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check16(input logic [15:0] x, input logic [15:0] y, input logic ci);
    longint exp;
    x16 = x; y16 = y; ci16 = ci;
    #1;
    exp = longint'(x) + longint'(y) + longint'(ci);
    checks++;
    if ({co16, s16} !== 17'(exp)) begin
      failures++;
      if (failures < 10) $display("FAIL W=16 %h+%h+%0d -> %h", x, y, ci, {co16, s16});
    end
    for (int g = 1; g < int'(NG16); g++) begin
      if (dut16.carry[g]) n_sel1[g]++;
      else                n_sel0[g]++;
    end
  endtask

  task automatic check24(input logic [23:0] x, input logic [23:0] y, input logic ci);
    longint exp;
    x24 = x; y24 = y; ci24 = ci;
    #1;
    exp = longint'(x) + longint'(y) + longint'(ci);
    checks++;
    if ({co24, s24} !== 25'(exp)) begin
      failures++;
      if (failures < 10) $display("FAIL W=24 %h+%h+%0d -> %h", x, y, ci, {co24, s24});
    end
  endtask

  initial begin
    foreach (n_sel1[g]) begin n_sel1[g] = 0; n_sel0[g] = 0; end
    // exhaustive 5-bit
    for (int i = 0; i < 2048; i++) begin
      {ci5, x5, y5} = 11'(i);
      #1;
      checks++;
      if ({co5, s5} !== 6'(int'(x5) + int'(y5) + int'(ci5))) begin
        failures++;
        if (failures < 10) $display("FAIL W=5 %0d+%0d+%0d -> %0d", x5, y5, ci5, {co5, s5});
      end
    end
    // corners: full carry propagation through every group
    check16(16'hFFFF, 16'h0000, 1'b1);
    check16(16'hFFFF, 16'hFFFF, 1'b1);
    check16(16'h0000, 16'h0000, 1'b0);
    check16(16'h8000, 16'h8000, 1'b0);
    check16(16'h07FF, 16'h0001, 1'b0);
    check24(24'hFFFFFF, 24'h000000, 1'b1);
    check24(24'hFFFFFF, 24'hFFFFFF, 1'b1);
    check24(24'h3FFFFF, 24'h000001, 1'b0);
    for (int i = 0; i < 100000; i++) begin
      check16(16'($urandom), 16'($urandom), 1'($urandom));
      check24(24'($urandom), 24'($urandom), 1'($urandom));
    end
    for (int g = 1; g < int'(NG16); g++) begin
      $display("16-bit group %0d: converter output chosen %0d times, direct output %0d times",
               g, n_sel1[g], n_sel0[g]);
      checks += 2;
      if (n_sel1[g] == 0) failures++;
      if (n_sel0[g] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
