// tb_dtc_gain_lms: closed-loop test of the sign-sign LMS gain calibration.
// A stand-in DTC turns a random phase p in [0,1) into the code
// round(p*gain/16) (as the DCW multiplier does) and a timing error
// code - p*G_TRUE/16 - theta + noise; the BBPD sign of it is returned one
// cycle after the code. theta stands for the PLL phase loop, which drives
// the mean error to zero (it moves 0.02 code units per decision). The gain word must settle within 2 % of G_TRUE, track a
// step of G_TRUE, and hold while en is low.
`timescale 1ns/1ps
module tb_dtc_gain_lms;
  import trx_pkg::*;
  logic clk = 0, rst_n = 0, en = 1;
  logic [5:0] code = 0;
  bbpd_t bbpd = BB_NONE;
  logic [9:0] gain;
  logic [15:0] acc;
  int checks = 0, failures = 0;
  real g_true = 600.0, p, e, p_prev;
  real code_prev, theta = 0.0;

  dtc_gain_lms dut (.clk, .rst_n, .en, .code, .bbpd, .gain, .acc);
  always #5 clk = ~clk;

  function automatic real noise();
    return (real'($urandom_range(0, 1000)) - 500.0) / 500.0 * 0.4;
  endfunction

  // one cycle: judge the code of the previous cycle, present a new one
  task automatic cyc();
    real c;
    e = code_prev - p_prev * g_true / 16.0 - theta + noise();
    theta += (e > 0.0) ? 0.02 : -0.02;
    p = real'($urandom_range(0, 65535)) / 65536.0;
    c = p * real'(gain) / 16.0 + 0.5;
    if (c > 63.0) c = 63.0;
    @(negedge clk);
    bbpd <= (e > 0.0) ? BB_LATE : BB_EARLY;
    code <= 6'($rtoi(c));
    code_prev = real'($rtoi(c)); p_prev = p;
  endtask

  function automatic real avg_gain();
    return real'(acc) / 64.0;
  endfunction

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (gain %0.1f, target %0.1f)", msg, avg_gain(), g_true); end
  endtask

  real held;
  initial begin
    p_prev = 0; code_prev = 0;
    #12 rst_n = 1;
    chk(acc == 16'd32768, "starts at 512");
    repeat (20000) cyc();
    chk(avg_gain() > 0.98 * g_true && avg_gain() < 1.02 * g_true, "converged");
    g_true = 470.0;
    repeat (20000) cyc();
    chk(avg_gain() > 0.98 * g_true && avg_gain() < 1.02 * g_true, "tracked step");
    en = 0; held = avg_gain(); g_true = 900.0;
    repeat (2000) cyc();
    chk(avg_gain() == held, "held while disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #5ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
