// tb_bec: self-check of the binary to excess-1 converter. The 4-bit default
// is checked over all 16 inputs against the function table (input + 1,
// 1111 wrapping to 0000); a 6-bit instance is checked over all 64 inputs.
module tb_bec;
  logic [3:0] b4, x4;
  logic [5:0] b6, x6;
  int checks = 0, failures = 0;

  bec          dut4 (.bin(b4), .x(x4));
  bec #(.W(6)) dut6 (.bin(b6), .x(x6));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      b4 = 4'(i);
      #1;
      checks++;
      if (x4 !== 4'((i + 1) % 16)) begin
        failures++;
        $display("FAIL W=4 %b -> %b", b4, x4);
      end
    end
    for (int i = 0; i < 64; i++) begin
      b6 = 6'(i);
      #1;
      checks++;
      if (x6 !== 6'((i + 1) % 64)) begin
        failures++;
        $display("FAIL W=6 %b -> %b", b6, x6);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
