// tb_refd_dcc: closed-loop test of the reference-doubler duty-cycle
// correction. Odd edges carry an extra delay SKEW (fine units); the
// correction (+mag on odd, -mag on even edges) is registered with the
// parity like the DTC code, and the stand-in BBPD judges it one cycle
// later, after subtracting theta, which stands for the PLL phase loop
// removing the mean error. mag must settle at -SKEW/2 within 2 units for two skews, and
// hold while en is low.
`timescale 1ns/1ps
module tb_refd_dcc;
  import trx_pkg::*;
  logic clk = 0, rst_n = 0, en = 1;
  logic odd = 0, odd_q = 0;
  bbpd_t bbpd = BB_NONE;
  logic signed [7:0] corr, corr_q = 0;
  int checks = 0, failures = 0, skew = 40;
  real theta = 0.0;

  refd_dcc dut (.clk, .rst_n, .en, .odd, .odd_obs(odd_q), .bbpd, .corr);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    real e;
    e = real'(corr_q) + (odd_q ? real'(skew) : 0.0) - theta + (real'($urandom_range(0, 1000)) - 500.0) / 250.0;
    bbpd   <= (e > 0.0) ? BB_LATE : BB_EARLY;
    theta  += (e > 0.0) ? 0.05 : -0.05;
    odd    <= ~odd;
    odd_q  <= odd;
    corr_q <= corr;
  end

  task automatic chk_mag(input int exp_v, input string msg);
    int m;
    m = int'(dut.mag);
    checks++;
    if (m - exp_v > 2 || exp_v - m > 2) begin failures++; $display("FAIL: %s mag %0d exp %0d", msg, m, exp_v); end
  endtask

  initial begin
    int held;
    #12 rst_n = 1;
    repeat (20000) @(posedge clk);
    chk_mag(-20, "skew +40");
    skew = -30;
    repeat (20000) @(posedge clk);
    chk_mag(15, "skew -30");
    en = 0; held = int'(dut.mag); skew = 60;
    repeat (5000) @(posedge clk);
    chk_mag(held, "held while disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #5ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
