// tb_db_precoder: NRZ bits, each held for two x2 clocks, after a preamble
// of zeros and a single 1 used to find the pipeline delay. At every
// pc_valid the change of pc must equal the bit (running parity), and
// pc_valid must come once every two clocks.
`timescale 1ns/1ps
module tb_db_precoder;
  logic clk2x = 0, rst_n = 0, nrz_in = 0;
  logic pc, pc_valid, pc_prev = 0;
  int checks = 0, failures = 0, nv = 0, first = -1, sent = 0;
  bit bits [2000];
  db_precoder dut (.clk2x, .rst_n, .nrz_in, .pc, .pc_valid);
  always #1 clk2x = ~clk2x;
  always @(posedge clk2x) if (pc_valid) begin
    if (first < 0 && pc != pc_prev) first = nv;
    if (first >= 0) begin
      checks++;
      if ((pc ^ pc_prev) != bits[nv - first + 20]) begin
        failures++; $display("FAIL: symbol %0d", nv - first);
      end
    end
    pc_prev = pc; nv++;
  end
  initial begin
    for (int k = 0; k < 2000; k++) bits[k] = (k < 20) ? 1'b0 : (k == 20) ? 1'b1 : 1'($urandom);
    #3 rst_n = 1;
    @(negedge clk2x);
    for (int k = 0; k < 1990; k++) begin
      nrz_in = bits[k];
      repeat (2) @(negedge clk2x);
    end
    checks++;
    if (first < 0 || checks < 1900) begin failures++; $display("FAIL: too few symbols"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100us; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
