// tb_vedic_8x8: exhaustive self-check of the 8x8 Vedic multiplier against
// integer multiplication (65536 operand pairs), counting how often each of
// the two intermediate carries is set; a carry that never occurs fails.
module tb_vedic_8x8;
  logic [7:0]  a, b;
  logic [15:0] p;
  int checks = 0, failures = 0;
  int n_ca1 = 0, n_ca2 = 0;

  vedic_8x8 dut (.a(a), .b(b), .p(p));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 65536; i++) begin
      {a, b} = 16'(i);
      #1;
      checks++;
      if (p !== 16'(int'(a) * int'(b))) begin
        failures++;
        if (failures < 10) $display("FAIL %0d*%0d -> %0d", a, b, p);
      end
      if (dut.ca1) n_ca1++;
      if (dut.ca2) n_ca2++;
    end
    $display("first-adder carry set %0d times, second-adder carry set %0d times", n_ca1, n_ca2);
    checks += 2;
    if (n_ca1 == 0) failures++;
    if (n_ca2 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
