// tb_rca: self-check of the ripple-carry adder. The default 4-bit width and a
// 8-bit instance are both tested exhaustively over x, y and cin against
// integer addition.
module tb_rca;
  logic [3:0] x4, y4, s4;
  logic [7:0] x8, y8, s8;
  logic       ci4, co4, ci8, co8;
  int checks = 0, failures = 0;

  rca            dut4 (.x(x4), .y(y4), .cin(ci4), .s(s4), .cout(co4));
  rca #(.W(8))   dut8 (.x(x8), .y(y8), .cin(ci8), .s(s8), .cout(co8));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      {ci4, x4, y4} = 9'(i);
      #1;
      checks++;
      if ({co4, s4} !== 5'(int'(x4) + int'(y4) + int'(ci4))) begin
        failures++;
        $display("FAIL W=4 %0d+%0d+%0d -> %0d", x4, y4, ci4, {co4, s4});
      end
    end
    for (int i = 0; i < 131072; i++) begin
      {ci8, x8, y8} = 17'(i);
      #1;
      checks++;
      if ({co8, s8} !== 9'(int'(x8) + int'(y8) + int'(ci8))) begin
        failures++;
        if (failures < 10) $display("FAIL W=8 %0d+%0d+%0d -> %0d", x8, y8, ci8, {co8, s8});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
