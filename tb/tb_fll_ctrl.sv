// tb_fll_ctrl: the counter FLL against a stand-in DCO whose period is
// 900 + coarse*30 + medium*1.0 ps, counted against a 25 ns reference. From
// both ends of the range it must lock, with the counted frequency within
// its tolerance of the request (N = 23 -> 1087 ps); the codes must stay
// frozen once locked, steps may only occur at window ends, and lowering
// en must restart acquisition for a new N.
// Lock tolerance +-2 counts in 128 reference cycles is about 0.07 %.
`timescale 1ns/1ps
module tb_fll_ctrl;
  logic clk = 0, rst_n = 0, en = 1;
  logic [7:0] n_sel = 8'd23, dco_cnt = 0;
  logic [2:0] coarse;
  logic [4:0] med_code;
  logic locked;
  int checks = 0, failures = 0, cyc = 0, bad_step = 0;
  real acc = 0.0, t;
  logic [7:0] codes_prev;
  fll_ctrl dut (.clk, .rst_n, .en, .n_sel, .dco_cnt, .coarse, .med_code, .locked);
  always #12.5 clk = ~clk;
  always @(posedge clk) begin
    t = 900.0 + real'(coarse) * 30.0 + real'(med_code) * 1.0;
    acc += 25000.0 / t;
    dco_cnt <= 8'($rtoi(acc));
    acc -= real'($rtoi(acc));
    cyc <= cyc + 1;
    codes_prev <= {coarse, med_code};
    // steps only right after a 128-cycle window end
    if (rst_n && cyc > 2 && {coarse, med_code} != codes_prev && (dut.tick != 7'd0)) bad_step++;
  end
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (c=%0d m=%0d T=%0f)", msg, coarse, med_code, t); end
  endtask
  initial begin
    logic [7:0] held;
    #30 rst_n = 1;
    repeat (200000) begin @(posedge clk); if (locked) break; end
    chk(locked, "locked from mid-scale");
    chk(t > 25000.0 / 23.0 - 1.0 && t < 25000.0 / 23.0 + 1.0, "period within tolerance for N=23");
    held = {coarse, med_code};
    repeat (3000) @(posedge clk);
    chk({coarse, med_code} == held, "codes frozen after lock");
    // new request: N = 25 (1000 ps), restart with en
    n_sel = 8'd25; en = 0; @(posedge clk); en = 1;
    repeat (300000) begin @(posedge clk); if (locked) break; end
    chk(locked, "locked after restart");
    chk(t > 25000.0 / 25.0 - 1.0 && t < 25000.0 / 25.0 + 1.0, "period within tolerance for N=25");
    chk(bad_step == 0, "steps only at window ends");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #30ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
