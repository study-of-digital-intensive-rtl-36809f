// tb_duobinary_mod: end-to-end check of the differential duobinary
// modulator. A preamble of zeros and one 1 finds the delay, then for
// random NRZ data:
//  * Duo_P and Duo_N are never high together,
//  * the symbol magnitude |Duo_P - Duo_N| equals the NRZ bit (envelope),
//  * successive non-zero symbols alternate in sign (no DC),
//  * the running sum of the shaped current stays bounded.
`timescale 1ns/1ps
module tb_duobinary_mod;
  logic clk2x = 0, rst_n = 0, nrz_in = 0, duo_p, duo_n;
  logic signed [7:0] iout;
  int checks = 0, failures = 0, first = -1, cyc = 0, last_sign = 0, maxrun = 0;
  longint run = 0;
  bit bits [3000];
  duobinary_mod dut (.clk2x, .rst_n, .nrz_in, .duo_p, .duo_n, .iout);
  always #1 clk2x = ~clk2x;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at clock %0d", msg, cyc); end
  endtask

  // symbols are held for two clocks; look at them once per bit period
  always @(posedge clk2x) if (rst_n) begin
    cyc++;
    run += iout;
    if (run > maxrun) maxrun = int'(run);
    if (-run > maxrun) maxrun = int'(-run);
    if (duo_p && duo_n) chk(0, "both outputs high");
    if (first < 0 && (duo_p || duo_n)) first = cyc;
    if (first >= 0 && ((cyc - first) % 2 == 0) && (cyc - first) / 2 < 2900) begin
      chk((duo_p | duo_n) == bits[(cyc - first) / 2 + 20], "envelope equals NRZ");
      if (duo_p || duo_n) begin
        chk(last_sign == 0 || (duo_p ? 1 : -1) == -last_sign, "alternating sign");
        last_sign = duo_p ? 1 : -1;
      end
    end
  end

  initial begin
    for (int k = 0; k < 3000; k++) bits[k] = (k < 20) ? 1'b0 : (k == 20) ? 1'b1 : 1'($urandom);
    #3 rst_n = 1;
    @(negedge clk2x);
    for (int k = 0; k < 2950; k++) begin
      nrz_in = bits[k];
      repeat (2) @(negedge clk2x);
    end
    chk(first > 0, "symbols seen");
    chk(maxrun < 200, "bounded running sum (no DC)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100us; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
