// tb_dsm1: first-order delta-sigma truncation. For random constant inputs
// the mean of the output over 4096 cycles equals input/2^6 within 1/4096,
// and the output only takes the two neighbouring codes; inputs in the top
// code hold the output at full scale instead of wrapping.
`timescale 1ns/1ps
module tb_dsm1;
  logic clk = 0, rst_n = 0, en = 1;
  logic [15:0] din;
  logic [9:0] dout;
  int checks = 0, failures = 0;
  dsm1 dut (.clk, .rst_n, .en, .din, .dout);
  always #5 clk = ~clk;
  initial begin
    longint sum;
    bit range_ok;
    #12 rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      din = (t == 0) ? 16'hFFFF : 16'($urandom);
      repeat (70) @(posedge clk);
      sum = 0; range_ok = 1;
      repeat (4096) begin
        @(posedge clk); #1;
        sum += dout;
        if (dout != din[15:6] && dout != din[15:6] + 10'd1 && dout != 10'h3FF) range_ok = 0;
      end
      checks += 2;
      if (!range_ok) begin failures++; $display("FAIL: codes outside neighbours for %0d", din); end
      if (din[15:6] == 10'h3FF) begin
        if (sum != 4096 * 1023) begin failures++; $display("FAIL: top code not held"); end
      end else if (sum * 64 - longint'(din) * 4096 > 64 * 2 || longint'(din) * 4096 - sum * 64 > 64 * 2) begin
        failures++; $display("FAIL: mean %0f for input %0f", real'(sum) / 4096.0, real'(din) / 64.0);
      end
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
