// tb_vm16x16_beca: end-to-end self-check of the 16x16 Vedic multiplier at
// its default (and only) size.
//
// Drives corner operands (zero, one, all ones, single bits), two operand
// pairs from the published simulation of the design (45*61 = 2745 and
// 9587*6954 = 66667998) and 200000 random pairs, and compares every product
// with 64-bit integer multiplication. It also counts the mechanisms the
// multiplier relies on and fails if one never happened:
//   - for every group above the first in each of the three BEC adders, the
//     converter output (carry-in 1) and the direct output (carry-in 0) being
//     selected;
//   - in each 8x8 block and in one 4x4 block, the first and the second
//     intermediate ripple-carry adder carrying out.
// The design is combinational; each vector is given one time unit to settle.
module tb_vm16x16_beca;
  import bec_adder_pkg::*;

  localparam int unsigned NG16 = num_groups(16);
  localparam int unsigned NG24 = num_groups(24);

  logic [15:0] a, b;
  logic [31:0] c;
  int checks = 0, failures = 0;

  int sel1_l [NG16], sel0_l [NG16];
  int sel1_r [NG16], sel0_r [NG16];
  int sel1_f [NG24], sel0_f [NG24];
  int ca1_8 [4], ca2_8 [4];
  int ca1_4 = 0, ca2_4 = 0;

  vm16x16_beca dut (.a(a), .b(b), .c(c));

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic count_events();
    for (int g = 1; g < int'(NG16); g++) begin
      if (dut.u_add_left.carry[g])  sel1_l[g]++; else sel0_l[g]++;
      if (dut.u_add_right.carry[g]) sel1_r[g]++; else sel0_r[g]++;
    end
    for (int g = 1; g < int'(NG24); g++) begin
      if (dut.u_add_final.carry[g]) sel1_f[g]++; else sel0_f[g]++;
    end
    if (dut.u_vm_hh.ca1) ca1_8[0]++;
    if (dut.u_vm_hh.ca2) ca2_8[0]++;
    if (dut.u_vm_hl.ca1) ca1_8[1]++;
    if (dut.u_vm_hl.ca2) ca2_8[1]++;
    if (dut.u_vm_lh.ca1) ca1_8[2]++;
    if (dut.u_vm_lh.ca2) ca2_8[2]++;
    if (dut.u_vm_ll.ca1) ca1_8[3]++;
    if (dut.u_vm_ll.ca2) ca2_8[3]++;
    if (dut.u_vm_ll.u_m0.ca1) ca1_4++;
    if (dut.u_vm_ll.u_m0.ca2) ca2_4++;
  endtask

  task automatic check(input logic [15:0] x, input logic [15:0] y);
    longint unsigned exp;
    a = x; b = y;
    #1;
    exp = longint'(x) * longint'(y);
    checks++;
    if (c !== 32'(exp)) begin
      failures++;
      if (failures < 10) $display("FAIL %0d*%0d -> %0d, expected %0d", x, y, c, exp);
    end
    count_events();
  endtask

  task automatic need(input string what, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("MISSING: %s never happened", what);
    end
  endtask

  initial begin
    foreach (sel1_l[g]) begin sel1_l[g] = 0; sel0_l[g] = 0; sel1_r[g] = 0; sel0_r[g] = 0; end
    foreach (sel1_f[g]) begin sel1_f[g] = 0; sel0_f[g] = 0; end
    foreach (ca1_8[i])  begin ca1_8[i] = 0; ca2_8[i] = 0; end

    // published simulation operands
    check(16'd45, 16'd61);
    if (c !== 32'd2745) $display("FAIL 45*61");
    check(16'd9587, 16'd6954);
    if (c !== 32'd66667998) $display("FAIL 9587*6954");

    // corners
    check(16'h0000, 16'h0000);
    check(16'hFFFF, 16'hFFFF);
    check(16'hFFFF, 16'h0001);
    check(16'h0001, 16'hFFFF);
    check(16'hFFFF, 16'h0000);
    check(16'h8000, 16'h8000);
    check(16'h00FF, 16'hFF00);
    check(16'hFF00, 16'h00FF);
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++)
        check(16'(1) << i, 16'(1) << j);

    for (int i = 0; i < 200000; i++)
      check(16'($urandom), 16'($urandom));

    for (int g = 1; g < int'(NG16); g++) begin
      $display("left  adder group %0d: converter %0d, direct %0d", g, sel1_l[g], sel0_l[g]);
      $display("right adder group %0d: converter %0d, direct %0d", g, sel1_r[g], sel0_r[g]);
      need($sformatf("left adder group %0d converter select", g),  sel1_l[g]);
      need($sformatf("left adder group %0d direct select", g),     sel0_l[g]);
      need($sformatf("right adder group %0d converter select", g), sel1_r[g]);
      need($sformatf("right adder group %0d direct select", g),    sel0_r[g]);
    end
    for (int g = 1; g < int'(NG24); g++) begin
      $display("final adder group %0d: converter %0d, direct %0d", g, sel1_f[g], sel0_f[g]);
      need($sformatf("final adder group %0d converter select", g), sel1_f[g]);
      need($sformatf("final adder group %0d direct select", g),    sel0_f[g]);
    end
    for (int i = 0; i < 4; i++) begin
      $display("8x8 block %0d: first-adder carry %0d, second-adder carry %0d", i, ca1_8[i], ca2_8[i]);
      need($sformatf("8x8 block %0d first-adder carry", i),  ca1_8[i]);
      need($sformatf("8x8 block %0d second-adder carry", i), ca2_8[i]);
    end
    $display("4x4 block: first-adder carry %0d, second-adder carry %0d", ca1_4, ca2_4);
    need("4x4 first-adder carry",  ca1_4);
    need("4x4 second-adder carry", ca2_4);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
