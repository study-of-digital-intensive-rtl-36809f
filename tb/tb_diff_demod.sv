// tb_diff_demod: symbols rotating +90 degrees (bit 1) or -90 degrees
// (bit 0) from one strobe to the next, with up to +-30 degrees of phase
// noise, from a random starting phase, must be decided correctly from the
// one-bit difference rule.
`timescale 1ns/1ps
module tb_diff_demod;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [13:0] i_in = 0, q_in = 0;
  logic bit_out, bit_valid;
  int checks = 0, failures = 0;
  bit exp_q [$];
  diff_demod dut (.clk, .rst_n, .in_valid, .i_in, .q_in, .bit_out, .bit_valid);
  always #5 clk = ~clk;
  always @(posedge clk) if (bit_valid) begin
    if (exp_q.size() > 0) begin
      checks++;
      if (bit_out != exp_q[0]) begin failures++; $display("FAIL: bit %0d exp %0d", bit_out, exp_q[0]); end
      void'(exp_q.pop_front());
    end
  end
  initial begin
    real th = real'($urandom_range(0, 6283)) / 1000.0, a;
    bit b;
    #12 rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      b = 1'($urandom);
      th += b ? 1.5708 : -1.5708;
      a = th + (real'($urandom_range(0, 1000)) - 500.0) / 500.0 * 0.52;
      @(negedge clk);
      i_in = 14'($rtoi(3000.0 * $cos(a))); q_in = 14'($rtoi(3000.0 * $sin(a)));
      in_valid = 1;
      if (k > 0) exp_q.push_back(b);
      @(negedge clk) in_valid = 0;
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    repeat (3) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
