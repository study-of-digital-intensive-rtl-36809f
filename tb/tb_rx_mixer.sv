// tb_rx_mixer: registered products I = x*cos/128, Q = -x*sin/128 for random
// inputs; outputs hold while en is low.
`timescale 1ns/1ps
module tb_rx_mixer;
  logic clk = 0, rst_n = 0, en = 0;
  logic signed [13:0] din = 0, i_out, q_out;
  logic signed [7:0] lo_cos = 0, lo_sin = 0;
  int checks = 0, failures = 0;
  rx_mixer dut (.clk, .rst_n, .en, .din, .lo_cos, .lo_sin, .i_out, .q_out);
  always #5 clk = ~clk;
  initial begin
    int ei, eq;
    #12 rst_n = 1;
    repeat (3000) begin
      @(negedge clk);
      en = ($urandom_range(0, 4) != 0);
      din = 14'($urandom); lo_cos = 8'($urandom); lo_sin = 8'($urandom);
      if (lo_cos == -128) lo_cos = -127;
      if (lo_sin == -128) lo_sin = -127;
      ei = en ? (int'(din) * int'(lo_cos)) >>> 7 : int'(i_out);
      eq = en ? -(int'(din) * int'(lo_sin)) >>> 7 : int'(q_out);
      @(negedge clk);
      checks++;
      if (int'(i_out) != ei || int'(q_out) != eq) begin
        failures++; $display("FAIL: x=%0d c=%0d s=%0d -> %0d %0d exp %0d %0d", din, lo_cos, lo_sin, i_out, q_out, ei, eq);
      end
      en = 0;
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
