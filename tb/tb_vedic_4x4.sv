// tb_vedic_4x4: exhaustive self-check of the 4x4 Vedic multiplier against
// integer multiplication (256 operand pairs). It also counts how often each
// of the two intermediate carries (first and second ripple-carry adder) is
// set, and fails if either never is, so both carry paths are exercised.
module tb_vedic_4x4;
  logic [3:0] a, b;
  logic [7:0] p;
  int checks = 0, failures = 0;
  int n_ca1 = 0, n_ca2 = 0;

  vedic_4x4 dut (.a(a), .b(b), .p(p));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      {a, b} = 8'(i);
      #1;
      checks++;
      if (p !== 8'(int'(a) * int'(b))) begin
        failures++;
        $display("FAIL %0d*%0d -> %0d", a, b, p);
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
