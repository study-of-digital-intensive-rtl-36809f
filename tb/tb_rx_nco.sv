// tb_rx_nco: with fcw = 2^16/8 (1 MHz at 8 MS/s) the LO repeats every 8
// samples, has amplitude close to 127 (sin^2 + cos^2 within 4 %), and cos
// leads sin by a quarter period; a freq_adj offset changes the period.
`timescale 1ns/1ps
module tb_rx_nco;
  logic clk = 0, rst_n = 0, en = 1;
  logic [15:0] fcw = 16'd8192;
  logic signed [15:0] freq_adj = 0;
  logic signed [7:0] lo_cos, lo_sin;
  int checks = 0, failures = 0;
  int s [64], c [64];
  rx_nco dut (.clk, .rst_n, .en, .fcw, .freq_adj, .lo_cos, .lo_sin);
  always #5 clk = ~clk;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    int m2;
    #12 rst_n = 1;
    repeat (10) @(negedge clk);
    for (int k = 0; k < 64; k++) begin @(negedge clk); s[k] = lo_sin; c[k] = lo_cos; end
    for (int k = 0; k < 56; k++) begin
      chk(s[k] == s[k+8] && c[k] == c[k+8], "period 8");
      chk(c[k+2] == -s[k] || c[k+2] == -s[k] + 1 || c[k+2] == -s[k] - 1, "quadrature");
      m2 = s[k] * s[k] + c[k] * c[k];
      chk(m2 > 15480 && m2 < 16780, "amplitude");
    end
    // freq_adj = -4096: step 4096 -> period 16
    freq_adj = -16'sd4096;
    repeat (10) @(negedge clk);
    for (int k = 0; k < 64; k++) begin @(negedge clk); s[k] = lo_sin; end
    for (int k = 0; k < 40; k++) chk(s[k] == s[k+16], "period 16 with freq_adj");
    chk(s[0] != s[8] || s[4] != s[12], "not period 8 any more");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
