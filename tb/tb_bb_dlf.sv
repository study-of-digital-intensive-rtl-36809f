// tb_bb_dlf: checks of the bang-bang loop filter.
//  * reset and clr put the code at mid-scale (16),
//  * a late decision followed by an early one moves the code by the
//    proportional step (about one code) each way, plus the integral step,
//  * a long run of late decisions drives the code to 31 and it stays
//    there (saturation, no wrap),
//  * closed loop with a frequency-offset plant: the phase error integrates
//    (target - code - frac/256) each cycle and the BBPD returns its sign;
//    the average code must equal the target within 0.1.
`timescale 1ns/1ps
module tb_bb_dlf;
  import trx_pkg::*;
  logic clk = 0, rst_n = 0, en = 1, clr = 0;
  bbpd_t bbpd = BB_NONE;
  logic [4:0] code_int;
  logic [7:0] code_frac;
  int checks = 0, failures = 0;
  real ph = 0.0, target, sum;
  bit closed = 0;

  bb_dlf dut (.clk, .rst_n, .en, .clr, .bbpd, .code_int, .code_frac);
  always #5 clk = ~clk;

  always @(posedge clk) if (closed) begin
    // a code below target leaves the DCO fast: the reference edge drifts late
    ph += target - (real'(code_int) + real'(code_frac) / 256.0);
    bbpd <= (ph > 0.0) ? BB_LATE : BB_EARLY;
  end

  function automatic real cval();
    return real'(code_int) + real'(code_frac) / 256.0;
  endfunction

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (code %0d.%0d)", msg, code_int, code_frac); end
  endtask

  initial begin
    #12 rst_n = 1;
    @(negedge clk) chk(code_int == 5'd16, "mid-scale after reset");
    // proportional step 1023*2^6 = 0.999 code, integral step 1023*2^4 = 0.25
    bbpd = BB_LATE;  @(negedge clk);
    chk(cval() > 16.99 && cval() < 17.0, "late: +1 proportional step");
    bbpd = BB_EARLY; @(negedge clk);
    chk(cval() > 15.24 && cval() < 15.26, "early: -1 step plus one integral step");
    bbpd = BB_NONE;  @(negedge clk);
    chk(code_int == 5'd16, "no decision: integral only");
    bbpd = BB_LATE;
    repeat (400) @(negedge clk);
    chk(code_int == 5'd31, "saturates high");
    repeat (400) @(negedge clk);
    chk(code_int == 5'd31, "stays saturated");
    clr = 1; @(negedge clk); clr = 0; bbpd = BB_NONE; @(negedge clk);
    chk(code_int == 5'd16, "clr returns to mid-scale");
    closed = 1;
    for (int t = 0; t < 3; t++) begin
      target = 8.3 + 6.7 * t;
      repeat (3000) @(negedge clk);
      sum = 0;
      repeat (4000) begin @(negedge clk); sum += real'(code_int) + real'(code_frac) / 256.0; end
      chk(sum / 4000.0 > target - 0.1 && sum / 4000.0 < target + 0.1, "closed-loop average");
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
