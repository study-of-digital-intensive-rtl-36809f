// tb_fcw_acc: compares the FCW accumulator with a reference model for
// constant fractions and for random signed modulation offsets; checks
// that the average of n_sel equals the FCW (N + frac) over 65536 cycles.
`timescale 1ns/1ps
module tb_fcw_acc;
  logic clk = 0, rst_n = 0;
  logic [7:0] fcw_int = 8'd23;
  logic [15:0] fcw_frac = 16'd3277;
  logic signed [7:0] fcw_mod = 0;
  logic [15:0] phase;
  logic [7:0] n_sel;
  int checks = 0, failures = 0;
  longint ref_ph, sum_n;
  int ref_n;

  fcw_acc dut (.clk, .rst_n, .fcw_int, .fcw_frac, .fcw_mod, .phase, .n_sel);
  always #5 clk = ~clk;

  task automatic step();
    longint nx;
    nx = ref_ph + longint'(fcw_frac) + longint'(fcw_mod) * 64;
    ref_n = int'(fcw_int) + int'(nx >>> 16);
    ref_ph = nx & 64'hFFFF;
    @(posedge clk); #1;
    checks++;
    if (phase != 16'(ref_ph) || n_sel != 8'(ref_n)) begin
      failures++; $display("FAIL: phase %0d/%0d n %0d/%0d", phase, ref_ph, n_sel, ref_n);
    end
  endtask

  initial begin
    ref_ph = 0;
    #12 rst_n = 1;
    @(negedge clk);
    ref_ph = longint'(phase);
    sum_n = 0;
    for (int k = 0; k < 65536; k++) begin step(); sum_n += n_sel; end
    checks++;
    if (sum_n != 65536 * 23 + 3277) begin failures++; $display("FAIL: average n_sel %0d", sum_n); end
    for (int k = 0; k < 5000; k++) begin
      fcw_mod = 8'($urandom);
      if (k % 100 == 0) fcw_frac = 16'($urandom);
      step();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
