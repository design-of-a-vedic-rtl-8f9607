// tb_bec_mux: exhaustive self-check of the converter-plus-mux stage:
// s must equal bin when cin = 0 and bin + 1 (mod 16) when cin = 1.
module tb_bec_mux;
  logic [3:0] bin, s;
  logic       cin;
  int checks = 0, failures = 0;

  bec_mux dut (.bin(bin), .cin(cin), .s(s));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      {cin, bin} = 5'(i);
      #1;
      checks++;
      if (s !== 4'(int'(bin) + int'(cin))) begin
        failures++;
        $display("FAIL bin=%b cin=%0b -> %b", bin, cin, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
