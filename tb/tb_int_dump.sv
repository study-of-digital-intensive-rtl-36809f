// tb_int_dump: the integrate-and-dump must output the sum of each group of
// DEC = 8 enabled samples, with valid for one cycle per group, and ignore
// cycles with en low.
`timescale 1ns/1ps
module tb_int_dump;
  logic clk = 0, rst_n = 0, en = 0;
  logic signed [14:0] din = 0;
  logic signed [17:0] dout;
  logic valid;
  int checks = 0, failures = 0, sum = 0, n = 0, exp_q [$];
  int_dump dut (.clk, .rst_n, .en, .din, .dout, .valid);
  always #5 clk = ~clk;
  always @(posedge clk) if (valid) begin
    checks++;
    if (exp_q.size() == 0 || int'(dout) != exp_q[0]) begin
      failures++; $display("FAIL: dump %0d", dout);
    end
    if (exp_q.size() > 0) void'(exp_q.pop_front());
  end
  initial begin
    #12 rst_n = 1;
    repeat (4000) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      din = 15'($urandom);
      if (en) begin
        sum += int'(din); n++;
        if (n == 8) begin exp_q.push_back(sum); sum = 0; n = 0; end
      end
    end
    @(negedge clk) en = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || checks < 300) begin failures++; $display("FAIL: %0d dumps missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
