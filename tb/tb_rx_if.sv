// tb_rx_if: the whole IF receiver on a GMSK test signal (500 kb/s, BT 0.5,
// 8 MS/s ADC samples on a 1 MHz IF with a 10 kHz carrier offset, a DC
// offset, noise, and a +300 ppm symbol-rate offset). Checks:
//  * carrier recovery settles cr_freq at the 10 kHz offset (82 LSB of
//    the 16-bit NCO word) within +-30 LSB,
//  * timing recovery takes more advances than retards (fast symbols),
//  * after acquisition the recovered bits match the sent bits (best
//    alignment searched once) with a bit-error ratio below 1 %.
`timescale 1ns/1ps
module tb_rx_if;
  logic clk = 0, rst_n = 0, adc_valid = 0;
  logic signed [9:0] adc_data;
  logic rx_bit, rx_bit_valid, tr_adv, tr_ret;
  logic signed [15:0] cr_freq;
  int checks = 0, failures = 0, n_adv = 0, n_ret = 0, cyc = 0;
  bit rx [$];
  real bi, bq;

  always #12.5 clk = ~clk;           // 40 MHz system clock
  always @(posedge clk) begin
    cyc <= cyc + 1;
    adc_valid <= rst_n && (cyc % 5 == 0);   // 8 MS/s
  end

  gmsk_if_gen #(.IF_HZ(1.01e6), .PPM(300.0)) gen (.clk, .en(adc_valid), .if_data(adc_data), .bb_i(bi), .bb_q(bq));

  rx_if dut (.clk, .rst_n, .adc_valid, .adc_data, .nco_fcw(16'd8192), .lpf1_bw(3'd2), .lpf2_bw(3'd2),
             .rx_bit, .rx_bit_valid, .cr_freq, .tr_adv, .tr_ret);

  always @(posedge clk) if (rst_n) begin
    if (rx_bit_valid) rx.push_back(rx_bit);
    if (tr_adv) n_adv++;
    if (tr_ret) n_ret++;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    int best, best_off, e, nb, start;
    #100 rst_n = 1;
    wait (rx.size() >= 3000);
    $display("cr_freq=%0d adv=%0d ret=%0d sent=%0d rx=%0d", cr_freq, n_adv, n_ret, gen.sent.size(), rx.size());
    chk(cr_freq > 52 && cr_freq < 112, "carrier offset tracked");
    chk(n_adv > n_ret, "timing advances for fast symbols");
    // alignment: rx[k] against sent[k + off]
    start = 1000;
    best = 1 << 30; best_off = 0;
    for (int off = -20; off <= 20; off++) begin
      e = 0;
      for (int k = start; k < start + 300; k++)
        if (k + off >= 0 && k + off < gen.sent.size() && rx[k] != gen.sent[k + off]) e++;
      if (e < best) begin best = e; best_off = off; end
    end
    e = 0; nb = 0;
    for (int k = start; k < rx.size() - 25; k++) begin
      if (k + best_off < gen.sent.size()) begin
        nb++;
        if (rx[k] != gen.sent[k + best_off]) e++;
      end
    end
    $display("alignment %0d, %0d errors in %0d bits", best_off, e, nb);
    chk(nb > 1500 && e * 100 < nb, "bit-error ratio below 1 %");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #20ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
