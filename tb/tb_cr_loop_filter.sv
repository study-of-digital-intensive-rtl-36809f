// tb_cr_loop_filter: the carrier-recovery PI filter against a reference:
// integ += (err << 10) >>> 12 (clamped to +-2^24), freq = integ/2^10 + err >>> 6,
// updated only on valid; includes runs that hit both clamps.
`timescale 1ns/1ps
module tb_cr_loop_filter;
  logic clk = 0, rst_n = 0, valid = 0;
  logic signed [17:0] err = 0;
  logic signed [15:0] freq;
  int checks = 0, failures = 0;
  longint integ = 0, f;
  cr_loop_filter dut (.clk, .rst_n, .valid, .err, .freq);
  always #5 clk = ~clk;
  initial begin
    #12 rst_n = 1;
    for (int k = 0; k < 60000; k++) begin
      @(negedge clk);
      valid = (k < 40000) || ($urandom_range(0, 2) == 0);
      if (k < 20000)      err = 18'($urandom_range(60000, 131071));      // drive to +clamp
      else if (k < 40000) err = -18'sd1 * 18'($urandom_range(60000, 131071)); // to -clamp
      else               err = 18'($urandom);
      if (valid) begin
        integ += (longint'(err) * 1024) >>> 12;
        if (integ > 16384 * 1024) integ = 16384 * 1024;
        if (integ < -16384 * 1024) integ = -16384 * 1024;
        f = (integ >>> 10) + (longint'(err) >>> 6);
      end
      @(negedge clk);
      valid = 0;
      checks++;
      if (longint'(freq) != 16'(f) && longint'(freq) != longint'($signed(16'(f)))) begin
        failures++; $display("FAIL: freq %0d exp %0d", freq, f);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
