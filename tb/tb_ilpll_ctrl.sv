// tb_ilpll_ctrl: closed-loop test of the IL-PLL digital control against the
// discrete-time timing model (ilpll_model).
//  1. integer-N, FCW = 23: the FLL must lock and the DLF must null the
//     mean BBPD error.
//  2. fractional-N, FCW = 23 + 3389/65536, linear DTC, gain calibration
//     on: the coarse and fine gain words must reach the values the model's
//     delays imply (gc = 16 T_dco / T_coarse, gf = 4 T_coarse / T_fine).
//  3. DTC with +-15 ps coarse nonlinearity, gain words frozen, TANC on:
//     the rms timing error must fall well below its value without TANC.
//  4. reference doubler on with a 5 ps odd-edge skew: the doubler
//     correction (+ on odd, - on even edges) must settle at -2.5 ps in
//     fine-word units (256 per coarse LSB).
`timescale 1ns/1ps
module tb_ilpll_ctrl;
  import trx_pkg::*;
  logic clk_ref = 0, clk_dsm = 0, clk_vg = 0, rst_n = 0;
  logic [7:0] fcw_int = 8'd23;
  logic [15:0] fcw_frac = 16'd0;
  logic fll_en = 1, frac_en = 0, gain_cal_en = 0, tanc_en = 0, dcc_en = 0, refd_en = 0;
  bbpd_t bbpd;
  logic [7:0] dco_cnt, n_sel;
  logic [5:0] dtc_coarse;
  logic [7:0] dtc_fine;
  logic edge_odd, fll_locked;
  logic [2:0] dco_coarse;
  logic [30:0] dco_medium, dco_fine;
  logic [9:0] gc, gf;
  real err_ps, t_dco, ph_d [3];
  int checks = 0, failures = 0;

  always #12.5 clk_ref = ~clk_ref;
  always #4    clk_dsm = ~clk_dsm;
  always #2    clk_vg  = ~clk_vg;

  ilpll_ctrl dut (.clk_ref, .clk_dsm, .clk_vg, .rst_n, .fcw_int, .fcw_frac, .fcw_mod(8'sd0),
    .fll_en, .frac_en, .gain_cal_en, .tanc_en, .dcc_en, .refd_en, .bbpd, .dco_cnt, .n_sel,
    .dtc_coarse, .dtc_fine, .edge_odd, .dco_coarse, .dco_medium, .dco_fine, .fll_locked, .gc, .gf);

  // phase the DTC codes in flight were computed from (two register stages)
  always @(posedge clk_ref) begin
    ph_d[0] <= real'(dut.phase_m) / 65536.0;
    ph_d[1] <= ph_d[0];
  end

  ilpll_model #(.FCW(23.0), .DUTY_PS(5.0)) mdl_i (.clk_ref, .frac_en, .dco_coarse, .dco_medium, .dco_fine,
    .dtc_coarse, .dtc_fine, .edge_odd, .n_sel, .phase_frac(ph_d[1]), .bbpd(), .dco_cnt(), .err_ps(), .t_dco());
  ilpll_model #(.FCW(23.0 + 3389.0/65536.0), .INL_PS(0.0)) mdl_g (.clk_ref, .frac_en, .dco_coarse, .dco_medium, .dco_fine,
    .dtc_coarse, .dtc_fine, .edge_odd, .n_sel, .phase_frac(ph_d[1]), .bbpd(), .dco_cnt(), .err_ps(), .t_dco());
  ilpll_model #(.FCW(23.0 + 3389.0/65536.0), .DUTY_PS(5.0)) mdl_f (.clk_ref, .frac_en, .dco_coarse, .dco_medium, .dco_fine,
    .dtc_coarse, .dtc_fine, .edge_odd, .n_sel, .phase_frac(ph_d[1]), .bbpd(), .dco_cnt(), .err_ps(), .t_dco());

  // 0: integer-N model, 1: fractional-N with ideal DTC linearity,
  // 2: fractional-N with coarse-DTC nonlinearity and doubler skew
  int sel = 0;
  assign bbpd    = (sel == 2) ? mdl_f.bbpd    : (sel == 1) ? mdl_g.bbpd    : mdl_i.bbpd;
  assign dco_cnt = (sel == 2) ? mdl_f.dco_cnt : (sel == 1) ? mdl_g.dco_cnt : mdl_i.dco_cnt;
  assign err_ps  = (sel == 2) ? mdl_f.err_ps  : (sel == 1) ? mdl_g.err_ps  : mdl_i.err_ps;
  assign t_dco   = (sel == 2) ? mdl_f.t_dco   : (sel == 1) ? mdl_g.t_dco   : mdl_i.t_dco;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic run(input int n);
    repeat (n) @(posedge clk_ref);
  endtask


  real s2, s1, rms_a, rms_b, gcr, gfr, mag;
  int  steps;

  task automatic measure(input int n, output real rms, output real mean);
    s2 = 0; s1 = 0;
    repeat (n) begin
      @(posedge clk_ref);
      s2 += err_ps * err_ps; s1 += err_ps;
    end
    rms = $sqrt(s2 / n); mean = s1 / n;
  endtask

  real mean;
  initial begin
    run(4); rst_n = 1;
    // ---- 1: integer-N ----
    run(20000);
    chk(fll_locked, "FLL locked in integer-N");
    measure(4000, rms_a, mean);
    $display("int-N: T_dco=%0.2f target=%0.2f mean err=%0.2f rms=%0.2f", t_dco, 25000.0/23.0, mean, rms_a);
    chk(mean < 3.0 && mean > -3.0, "integer-N mean timing error nulled");
    chk(t_dco > 25000.0/23.0 - 8.0 && t_dco < 25000.0/23.0 + 8.0, "DCO period near target");
    // ---- 2: fractional-N, gain calibration ----
    sel = 1; fcw_frac = 16'd3389; frac_en = 1; gain_cal_en = 1; fll_en = 0;
    run(1); fll_en = 1;
    run(150000);
    gcr = 16.0 * (25000.0/(23.0 + 3389.0/65536.0)) / 28.6; gfr = 4.0 * 28.6 / 0.24;
    $display("gain cal: gc=%0d (ideal %0.1f) gf=%0d (ideal %0.1f) locked=%0b", gc, gcr, gf, gfr, fll_locked);
    chk(real'(gc) > 0.96*gcr && real'(gc) < 1.04*gcr, "coarse DTC gain calibrated");
    chk(real'(gf) > 0.93*gfr && real'(gf) < 1.07*gfr, "fine DTC gain calibrated");
    // ---- 3: TANC, gain words frozen (calibrations run in sequence) ----
    sel = 2; gain_cal_en = 0;
    run(5000);
    measure(20000, rms_a, mean);
    tanc_en = 1;
    run(400000);
    measure(20000, rms_b, mean);
    $display("rms timing error: gain cal only %0.2f ps, with TANC %0.2f ps", rms_a, rms_b);
    chk(rms_b < 0.7 * rms_a, "TANC reduces the timing error");
    chk(rms_b < 7.5, "residual error after TANC below 7.5 ps");

    // ---- 4: reference doubler duty-cycle calibration ----
    refd_en = 1; dcc_en = 1;
    run(150000);
    mag = real'(dut.u_dcc.mag);
    // +mag on odd edges, -mag on even ones: half the 5 ps odd/even skew each
    $display("doubler correction %0.1f fine units (ideal %0.1f)", mag, -2.5 * 256.0 / 28.6);
    chk(mag < -17.0 && mag > -28.0, "duty-cycle correction settled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #30ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
