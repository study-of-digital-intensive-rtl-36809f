// tb_rx_hpf: the DC-blocking high-pass must remove a DC offset (output
// below 2 LSB after settling) while passing a 1 MHz IF tone at 8 MS/s with
// its x4 scaling within 5 %.
`timescale 1ns/1ps
module tb_rx_hpf;
  logic clk = 0, rst_n = 0, en = 1;
  logic signed [9:0] din = 0;
  logic signed [13:0] dout;
  int checks = 0, failures = 0;
  rx_hpf dut (.clk, .rst_n, .en, .din, .dout);
  always #5 clk = ~clk;
  initial begin
    int mx;
    #12 rst_n = 1;
    din = 10'sd200;
    repeat (3000) @(negedge clk);
    checks++;
    if (dout > 2 || dout < -2) begin failures++; $display("FAIL: DC not removed (%0d)", dout); end
    mx = 0;
    for (int k = 0; k < 4000; k++) begin
      din = 10'($rtoi(50.0 + 200.0 * $sin(2.0 * 3.14159265 * k / 8.0)));
      @(negedge clk);
      if (k > 3000 && dout > mx) mx = dout;
    end
    checks++;
    if (mx < 760 || mx > 840) begin failures++; $display("FAIL: IF gain, peak %0d", mx); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
