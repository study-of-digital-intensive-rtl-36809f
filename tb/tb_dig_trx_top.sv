// tb_dig_trx_top: end-to-end run of the whole digital design at its default
// sizes (no parameter overrides on the top).
// The PLL control loop closes through the discrete-time timing model of the
// DCO / DTC / BBPD (ilpll_model), the RX IF stage is fed by a GMSK IF
// generator with a -300 ppm, then a +300 ppm symbol-clock error, and the duobinary modulator
// receives random NRZ data on its own clock.
// Sequence: integer-N FLL acquisition and bang-bang lock -> fractional-N
// with DTC gain calibration -> TANC and reference-doubler correction ->
// TX mode (GMSK direct modulation) -> RX mode (demodulation) -> duobinary.
// Every mechanism is counted; a mechanism that never happened is a failure:
// FLL steps and lock, DSM activity on the fine bank, DLF proportional and
// integral motion, coarse / fine gain updates, TANC and doubler updates,
// TX/RX mode switches, TX frequency deviation of both signs, RX timing
// advance and retard, carrier-loop motion, recovered bits, and duobinary
// +1 / -1 output pulses. The RX bits of the last 7.5 ms are also compared
// with the sent ones (bit-error ratio below 1 %).
`timescale 1ns/1ps
module tb_dig_trx_top;
  import trx_pkg::*;
  logic clk_ref = 0, clk_dsm = 0, clk_vg = 0, clk_adc = 0, clk2x = 0, rst_n = 0;
  logic tx_en = 0, tx_clk = 0, tx_data = 0;
  logic [7:0] kmod = 8'd200, fcw_int = 8'd23;
  logic [15:0] fcw_frac = 16'd0;
  logic fll_en = 1, frac_en = 0, gain_cal_en = 0, tanc_en = 0, dcc_en = 0, refd_en = 0;
  bbpd_t bbpd;
  logic [7:0] dco_cnt, n_sel;
  logic [5:0] dtc_coarse;
  logic [7:0] dtc_fine;
  logic edge_odd, fll_locked, tx_sym_en;
  logic [2:0] dco_coarse;
  logic [30:0] dco_medium, dco_fine;
  logic [9:0] dtc_gc, dtc_gf;
  logic signed [7:0] fcw_mod, db_iout;
  logic adc_valid = 0;
  logic signed [9:0] adc_data;
  logic rx_bit, rx_bit_valid, tr_adv, tr_ret, nrz_in = 0, duo_p, duo_n;
  logic signed [15:0] cr_freq;
  real err_ps, t_dco, ph_d [2], bi, bq;
  int checks = 0, failures = 0, cyc = 0;
  bit db_on = 0;

  always #12.5 clk_ref = ~clk_ref;
  always #4    clk_dsm = ~clk_dsm;
  always #2    clk_vg  = ~clk_vg;
  always #12.5 clk_adc = ~clk_adc;
  always #1    if (db_on) clk2x = ~clk2x;

  dig_trx_top dut (.clk_ref, .clk_dsm, .clk_vg, .clk_adc, .clk2x, .rst_n, .tx_en, .tx_clk,
    .tx_data, .kmod, .fcw_int, .fcw_frac, .fll_en, .frac_en, .gain_cal_en, .tanc_en, .dcc_en,
    .refd_en, .bbpd, .dco_cnt, .n_sel, .dtc_coarse, .dtc_fine, .edge_odd, .dco_coarse,
    .dco_medium, .dco_fine, .fll_locked, .dtc_gc, .dtc_gf, .fcw_mod, .tx_sym_en, .adc_valid,
    .adc_data, .nco_fcw(16'd8192), .lpf1_bw(3'd2), .lpf2_bw(3'd2), .rx_bit, .rx_bit_valid,
    .cr_freq, .tr_adv, .tr_ret, .nrz_in, .duo_p, .duo_n, .db_iout);

  // phase the DTC codes in flight were computed from (two register stages)
  always @(posedge clk_ref) begin
    ph_d[0] <= real'(dut.u_pll.phase_m) / 65536.0;
    ph_d[1] <= ph_d[0];
  end

  ilpll_model #(.FCW(23.0 + 3389.0/65536.0), .DUTY_PS(5.0)) mdl (.clk_ref, .frac_en,
    .dco_coarse, .dco_medium, .dco_fine, .dtc_coarse, .dtc_fine, .edge_odd, .n_sel,
    .phase_frac(ph_d[1]), .bbpd, .dco_cnt, .err_ps, .t_dco);

  // RX IF samples at 8 MS/s (every fifth 40 MHz clock)
  always @(posedge clk_adc) begin
    cyc <= cyc + 1;
    adc_valid <= rst_n && (cyc % 5 == 0);
  end
  // two sources with opposite symbol-clock errors, so that the timing loop
  // has to both advance and retard
  logic signed [9:0] if_a, if_b;
  real bi_b, bq_b;
  bit gsel = 1;
  gmsk_if_gen #(.IF_HZ(1.01e6), .PPM(300.0)) gen_a (.clk(clk_adc), .en(adc_valid),
    .if_data(if_a), .bb_i(bi), .bb_q(bq));
  gmsk_if_gen #(.IF_HZ(1.01e6), .PPM(-300.0), .SEED(11)) gen_b (.clk(clk_adc), .en(adc_valid),
    .if_data(if_b), .bb_i(bi_b), .bb_q(bq_b));
  assign adc_data = gsel ? if_b : if_a;

  // ---- mechanism counters ----
  int n_fll = 0, n_dsm = 0, n_dlf = 0, n_gc = 0, n_gf = 0, n_tanc = 0, n_dcc = 0;
  int n_txsw = 0, n_rxsw = 0, n_dev_p = 0, n_dev_n = 0, n_adv = 0, n_ret = 0, n_bits = 0;
  int n_cr = 0, n_dbp = 0, n_dbn = 0, n_lock = 0;
  // received bits (and how many bits source A had sent at that moment)
  bit ber_on = 0;
  bit rxq [$];
  int rxn [$];
  int be, best, best_d;
  logic [2:0] c_q;  logic [30:0] m_q, f_q;  logic [9:0] gc_q, gf_q;
  logic [7:0] tanc_q, dcc_q;  logic signed [15:0] cr_q;  logic tx_q, lk_q;
  logic [15:0] dlf_q;
  always @(posedge clk_ref) if (rst_n) begin
    c_q <= dco_coarse; m_q <= dco_medium; f_q <= dco_fine; gc_q <= dtc_gc; gf_q <= dtc_gf;
    tanc_q <= dut.u_pll.u_tanc.corr; dcc_q <= dut.u_pll.u_dcc.mag; tx_q <= tx_en;
    lk_q <= fll_locked; dlf_q <= 16'(dut.u_pll.u_dlf.code_int);
    if (dco_coarse != c_q || dco_medium != m_q) n_fll++;
    if (fll_locked && !lk_q) n_lock++;
    if (dco_fine != f_q) n_dsm++;
    if (16'(dut.u_pll.u_dlf.code_int) != dlf_q) n_dlf++;
    if (dtc_gc != gc_q) n_gc++;
    if (dtc_gf != gf_q) n_gf++;
    if (dut.u_pll.u_tanc.corr != tanc_q) n_tanc++;
    if (dut.u_pll.u_dcc.mag != dcc_q) n_dcc++;
    if (tx_en && !tx_q) n_txsw++;
    if (!tx_en && tx_q) n_rxsw++;
    if (fcw_mod > 8'sd20) n_dev_p++;
    if (fcw_mod < -8'sd20) n_dev_n++;
  end
  always @(posedge clk_adc) if (rst_n) begin
    cr_q <= cr_freq;
    if (tr_adv) n_adv++;
    if (tr_ret) n_ret++;
    if (rx_bit_valid) n_bits++;
    if (rx_bit_valid && ber_on) begin rxq.push_back(rx_bit); rxn.push_back(gen_a.sent.size()); end
    if (cr_freq != cr_q) n_cr++;
  end
  always @(posedge clk2x) if (rst_n) begin
    if (duo_p) n_dbp++;
    if (duo_n) n_dbn++;
    if (duo_p && duo_n) begin failures++; $display("FAIL: duobinary +1 and -1 at once"); end
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic run(input int n);
    repeat (n) @(posedge clk_ref);
  endtask

  real s2;
  task automatic rms(input int n, output real r);
    s2 = 0;
    repeat (n) begin @(posedge clk_ref); s2 += err_ps * err_ps; end
    r = $sqrt(s2 / n);
  endtask

  // TX data at 500 kb/s while tx_en is high
  initial forever begin
    #1000 tx_clk = 1'b0; tx_data = 1'($urandom);
    #1000 tx_clk = 1'b1;
  end
  // duobinary NRZ input: one bit per two clk2x cycles
  initial forever begin
    @(negedge clk2x); @(negedge clk2x);
    nrz_in = 1'($urandom);
  end

  real r_int, r_cal;
  initial begin
    run(4); rst_n = 1;
    // integer-N (the model runs at FCW 23 + 3389/65536, so integer-N
    // leaves a fractional ramp: only the FLL and the DLF are checked here)
    fcw_frac = 16'd3389;
    run(20000);
    chk(fll_locked, "FLL locked");
    // fractional-N with the DTC and gain calibration
    frac_en = 1; gain_cal_en = 1; fll_en = 0; run(1); fll_en = 1;
    run(120000);
    rms(5000, r_cal);
    $display("frac-N after gain cal: gc=%0d gf=%0d rms err %0.2f ps", dtc_gc, dtc_gf, r_cal);
    chk(r_cal < 15.0, "fractional-N timing error small after gain calibration");
    gain_cal_en = 0; tanc_en = 1; refd_en = 1; dcc_en = 1;
    run(100000);
    rms(5000, r_int);
    $display("with TANC and doubler correction: rms err %0.2f ps", r_int);
    chk(r_int < 15.0, "timing error small with TANC and doubler correction");
    // TX mode: direct GMSK modulation of the PLL
    tx_en = 1;
    run(20000);
    tx_en = 0;
    // RX mode
    run(100000);
    gsel = 0;
    run(100000);
    ber_on = 1;
    run(300000);
    ber_on = 0;
    // bit-error ratio against source A, at the best fixed latency
    best = 1 << 30; best_d = 0;
    for (int d = 1; d < 40; d++) begin
      be = 0;
      foreach (rxq[k]) if (rxq[k] != gen_a.sent[rxn[k] - d]) be++;
      if (be < best) begin best = be; best_d = d; end
    end
    $display("RX: %0d errors in %0d bits (latency %0d bits)", best, rxq.size(), best_d);
    chk(rxq.size() > 1000 && best * 100 < rxq.size(), "RX bit-error ratio below 1 %");
    // duobinary modulator
    db_on = 1;
    #20us db_on = 0;

    $display("FLL steps %0d locks %0d, DSM fine changes %0d, DLF moves %0d", n_fll, n_lock, n_dsm, n_dlf);
    $display("gc updates %0d, gf updates %0d, TANC updates %0d, DCC updates %0d", n_gc, n_gf, n_tanc, n_dcc);
    $display("TX switches %0d, RX switches %0d, deviation +%0d / -%0d", n_txsw, n_rxsw, n_dev_p, n_dev_n);
    $display("timing adv %0d ret %0d, carrier-loop moves %0d, bits %0d, cr_freq %0d", n_adv, n_ret, n_cr, n_bits, cr_freq);
    $display("duobinary +1 %0d, -1 %0d", n_dbp, n_dbn);
    chk(n_fll > 0,   "FLL steps happened");
    chk(n_lock > 0,  "FLL lock happened");
    chk(n_dsm > 0,   "DSM drove the fine bank");
    chk(n_dlf > 0,   "DLF moved");
    chk(n_gc > 0,    "coarse DTC gain updated");
    chk(n_gf > 0,    "fine DTC gain updated");
    chk(n_tanc > 0,  "TANC updated");
    chk(n_dcc > 0,   "doubler correction updated");
    chk(n_txsw > 0,  "switch to TX mode");
    chk(n_rxsw > 0,  "switch to RX mode");
    chk(n_dev_p > 0, "positive TX deviation");
    chk(n_dev_n > 0, "negative TX deviation");
    chk(n_adv > 0,   "timing advance");
    chk(n_ret > 0,   "timing retard");
    chk(n_cr > 0,    "carrier loop moved");
    chk(n_bits > 1000, "RX bits recovered");
    chk(n_dbp > 0,   "duobinary +1");
    chk(n_dbn > 0,   "duobinary -1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #40ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
