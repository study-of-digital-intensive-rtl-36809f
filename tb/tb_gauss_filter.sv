// tb_gauss_filter: checks the Gaussian pulse-shaping filter.
//  * impulse response equals the 13 taps (in/16 scaling) and is symmetric,
//  * DC gain: a constant input of 127 settles to 127*64/16 = 508,
//  * random +-127 symbols: every output equals a reference convolution.
`timescale 1ns/1ps
module tb_gauss_filter;
  logic clk = 0, rst_n = 0, in_en = 0;
  logic signed [7:0] din = 0;
  logic signed [9:0] dout;
  int checks = 0, failures = 0;
  int coef [13] = '{1, 2, 3, 5, 7, 9, 10, 9, 7, 5, 3, 2, 1};
  int hist [13];

  gauss_filter dut (.clk, .rst_n, .in_en, .din, .dout);
  always #5 clk = ~clk;

  task automatic push(input int x);
    @(posedge clk); in_en <= 1'b1; din <= 8'(x);
    @(posedge clk); in_en <= 1'b0;
    for (int i = 12; i > 0; i--) hist[i] = hist[i-1];
    hist[0] = x;
    repeat (2) @(posedge clk);
  endtask

  function automatic int ref_out();
    int a = 0;
    for (int i = 0; i < 13; i++) a += hist[i] * coef[i];
    return a >>> 4;
  endfunction

  task automatic chk(input int exp_v, input string what);
    checks++;
    if (dout !== 10'(exp_v)) begin failures++; $display("FAIL %s: got %0d exp %0d", what, dout, exp_v); end
  endtask

  initial begin
    foreach (hist[i]) hist[i] = 0;
    #20 rst_n = 1;
    // impulse of 16*8 = 128 would overflow 8 bits, use 64: output = 4*coef
    // the output is registered: each strobe shows the sum up to the
    // previous input
    push(64);
    for (int k = 0; k < 13; k++) begin
      push(0);
      chk(4 * coef[k], "impulse");
    end
    for (int k = 0; k < 15; k++) push(127);
    chk(508, "DC gain");
    for (int k = 0; k < 200; k++) begin
      int r;
      r = ref_out();
      push(($urandom & 1) ? 127 : -127);
      chk(r, "random symbols");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
