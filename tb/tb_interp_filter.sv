// tb_interp_filter: checks the 5 -> 40 MHz interpolator (three linear x2
// stages, total gain 4).
//  * a constant input settles to exactly 4x the input,
//  * a ramp of slope d per 5 MHz sample gives, once settled, an output
//    that rises by exactly d/2 every 40 MHz cycle (linear interpolation),
//  * for random inputs the output never leaves the range spanned by 4x
//    the inputs it is interpolating between (no overshoot).
`timescale 1ns/1ps
module tb_interp_filter;
  logic clk = 0, rst_n = 0, en5 = 0;
  logic signed [9:0] din = 0;
  logic signed [11:0] dout, prev;
  int checks = 0, failures = 0, cyc = 0;
  int hist [4];

  interp_filter dut (.clk, .rst_n, .en5, .din, .dout);
  always #12.5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    en5 <= rst_n && ((cyc % 8) == 0);
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (out=%0d)", msg, dout); end
  endtask

  initial begin
    int lo, hi, a, b;
    #40 rst_n = 1;
    // constant
    din = 10'sd100;
    repeat (80) @(posedge clk);
    #1 chk(dout == 12'sd400, "constant x4");
    // ramp: din changes right after each strobe
    for (int k = 0; k < 30; k++) begin
      @(posedge clk iff en5); #1 din = 10'(-200 + 16 * k);
      if (k > 6) begin
        for (int j = 0; j < 8; j++) begin
          prev = dout;
          @(posedge clk); #1;
          chk(dout - prev == 12'sd8, "ramp step d/2");
        end
      end
    end
    // random inputs, output bounded by 4x neighbouring inputs
    foreach (hist[i]) hist[i] = 0;
    for (int k = 0; k < 100; k++) begin
      @(posedge clk iff en5); #1;
      for (int i = 3; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = int'($urandom_range(0, 800)) - 400;
      din = 10'(hist[0]);
      if (k > 4) begin
        // the output lies on the line between two of the last inputs
        lo = 4 * hist[1]; hi = 4 * hist[1];
        for (int i = 2; i < 4; i++) begin
          a = 4 * hist[i]; b = a;
          if (a < lo) lo = a;
          if (b > hi) hi = b;
        end
        lo -= 4; hi += 4;
        for (int j = 0; j < 8; j++) begin
          @(posedge clk); #1;
          chk(dout >= lo && dout <= hi, "bounded by neighbours");
        end
      end
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
