// tb_rx_iir_lpf: the tunable IIR low-pass (orders 1 and 2) must have unity
// DC gain, attenuate a tone at fs/4 more for a larger bandwidth setting
// (narrower filter), and the second-order section more than the first.
`timescale 1ns/1ps
module tb_rx_iir_lpf;
  logic clk = 0, rst_n = 0, en = 1;
  logic [2:0] bw = 3'd2;
  logic signed [13:0] din = 0, d1, d2;
  int checks = 0, failures = 0;
  rx_iir_lpf #(.ORDER(1)) u1 (.clk, .rst_n, .en, .bw, .din, .dout(d1));
  rx_iir_lpf #(.ORDER(2)) u2 (.clk, .rst_n, .en, .bw, .din, .dout(d2));
  always #5 clk = ~clk;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  task automatic tone_peak(output int p1, output int p2);
    p1 = 0; p2 = 0;
    for (int k = 0; k < 1200; k++) begin
      din = (k % 4 == 0) ? 14'sd2000 : (k % 4 == 2) ? -14'sd2000 : 14'sd0;
      @(negedge clk);
      if (k > 800) begin
        if (d1 > p1) p1 = d1;
        if (d2 > p2) p2 = d2;
      end
    end
  endtask
  initial begin
    int a1 [4], a2 [4];
    #12 rst_n = 1;
    for (int b = 1; b <= 4; b++) begin
      bw = 3'(b);
      din = 14'sd3000;
      repeat (600) @(negedge clk);
      chk(d1 >= 2990 && d1 <= 3000 && d2 >= 2990 && d2 <= 3000, "unity DC gain");
      tone_peak(a1[b-1], a2[b-1]);
      chk(a2[b-1] < a1[b-1], "second order attenuates more");
      if (b > 1) chk(a1[b-1] < a1[b-2], "larger bw setting narrower");
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
