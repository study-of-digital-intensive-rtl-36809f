// tb_therm_dec: exhaustive check of the binary-to-thermometer decoder:
// exactly 'bin' ones, all at the bottom.
module tb_therm_dec;
  logic [4:0] bin;
  logic [30:0] therm;
  int checks = 0, failures = 0;
  therm_dec dut (.bin, .therm);
  initial begin
    for (int b = 0; b < 32; b++) begin
      bin = 5'(b); #1;
      checks++;
      if (therm != 31'((64'(1) << b) - 1)) begin failures++; $display("FAIL: %0d -> %b", b, therm); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
