// tb_semi_digital_fir: random three-level symbols on Duo_P / Duo_N; the
// output current must equal the convolution with [-3 0 9 15 9 0 -3] one
// clock later; an isolated +1 must reproduce the taps (pulse response).
`timescale 1ns/1ps
module tb_semi_digital_fir;
  logic clk2x = 0, rst_n = 0, duo_p = 0, duo_n = 0;
  logic signed [7:0] iout;
  int checks = 0, failures = 0;
  int h [7] = '{-3, 0, 9, 15, 9, 0, -3};
  int x [7];
  semi_digital_fir dut (.clk2x, .rst_n, .duo_p, .duo_n, .iout);
  always #1 clk2x = ~clk2x;
  task automatic push(input int v);
    int r;
    // one symbol per clock; the registered output lags the delay line by
    // one clock, so it shows the sum up to the previous symbol
    duo_p = (v > 0); duo_n = (v < 0);
    @(negedge clk2x);
    r = 0;
    for (int i = 0; i < 7; i++) r += h[i] * x[i];
    checks++;
    if (int'(iout) != r) begin failures++; $display("FAIL: out %0d exp %0d", iout, r); end
    for (int i = 6; i > 0; i--) x[i] = x[i-1];
    x[0] = v;
  endtask
  initial begin
    foreach (x[i]) x[i] = 0;
    #3 rst_n = 1;
    @(negedge clk2x);
    // pulse response: one +1 then zeros
    push(1);
    for (int k = 0; k < 8; k++) push(0);
    for (int k = 0; k < 3000; k++) push(int'($urandom_range(0, 2)) - 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100us; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
