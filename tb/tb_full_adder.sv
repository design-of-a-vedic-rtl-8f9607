// tb_full_adder: exhaustive self-check of the full adder,
// {co, s} = x + y + ci, over all eight input combinations.
module tb_full_adder;
  logic x, y, ci, s, co;
  int checks = 0, failures = 0;

  full_adder dut (.x(x), .y(y), .ci(ci), .s(s), .co(co));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {x, y, ci} = 3'(i);
      #1;
      checks++;
      if ({co, s} !== 2'(int'(x) + int'(y) + int'(ci))) begin
        failures++;
        $display("FAIL x=%0b y=%0b ci=%0b -> co=%0b s=%0b", x, y, ci, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
