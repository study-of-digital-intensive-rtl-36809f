// rx_if: all-digital IF stage of the heterodyne GMSK receiver.
// Input: 10-bit two's-complement samples of the 1 MHz IF from the SAR ADC
// at 8 MS/s (adc_valid marks each). Chain:
//   rx_hpf -> rx_mixer (LO from rx_nco) -> rx_iir_lpf, order 1 (LPF1)
//     -> costas_pd -> int_dump (8:1) -> cr_loop_filter -> rx_nco  [carrier loop]
//   LPF1 -> rx_iir_lpf, order 2 (LPF2) -> mm_timing_rec (8 -> 0.5 MS/s)
//     -> diff_demod -> rx_bit / rx_bit_valid
// nco_fcw sets the nominal IF (8192 = 1 MHz at 8 MS/s); lpf1_bw / lpf2_bw
// are the shifts that set the two low-pass bandwidths. cr_freq shows the
// carrier loop's frequency correction. The partition into carrier
// recovery, timing recovery and demodulation, the rates and the filter
// arrangement follow the receiver description; the arithmetic of each block
// is described in its own file.
module rx_if #(
  parameter int unsigned W = 14
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               adc_valid,
  input  logic signed [9:0]  adc_data,
  input  logic [15:0]        nco_fcw,
  input  logic [2:0]         lpf1_bw,
  input  logic [2:0]         lpf2_bw,
  output logic               rx_bit,
  output logic               rx_bit_valid,
  output logic signed [15:0] cr_freq,
  output logic               tr_adv,
  output logic               tr_ret
);
  logic signed [W-1:0] hp, mi, mq, l1i, l1q, l2i, l2q, si, sq;
  logic signed [7:0]   lc, ls;
  logic signed [W:0]   pe;
  logic signed [W+3:0] pe_sum;
  logic                pe_valid, s_valid;

  rx_hpf #(.IN_W(10), .W(W), .K(6)) u_hpf (.clk, .rst_n, .en(adc_valid), .din(adc_data), .dout(hp));
  rx_nco u_nco (.clk, .rst_n, .en(adc_valid), .fcw(nco_fcw), .freq_adj(cr_freq), .lo_cos(lc), .lo_sin(ls));
  rx_mixer #(.W(W)) u_mix (.clk, .rst_n, .en(adc_valid), .din(hp), .lo_cos(lc), .lo_sin(ls),
                           .i_out(mi), .q_out(mq));
  rx_iir_lpf #(.W(W), .ORDER(1)) u_l1i (.clk, .rst_n, .en(adc_valid), .bw(lpf1_bw), .din(mi), .dout(l1i));
  rx_iir_lpf #(.W(W), .ORDER(1)) u_l1q (.clk, .rst_n, .en(adc_valid), .bw(lpf1_bw), .din(mq), .dout(l1q));
  costas_pd #(.W(W)) u_pd (.i_in(l1i), .q_in(l1q), .err(pe));
  int_dump #(.W(W+1), .DEC(8)) u_id (.clk, .rst_n, .en(adc_valid), .din(pe), .dout(pe_sum), .valid(pe_valid));
  cr_loop_filter #(.IN_W(W+4), .OUT_W(16)) u_clf (.clk, .rst_n, .valid(pe_valid), .err(pe_sum), .freq(cr_freq));

  rx_iir_lpf #(.W(W), .ORDER(2)) u_l2i (.clk, .rst_n, .en(adc_valid), .bw(lpf2_bw), .din(l1i), .dout(l2i));
  rx_iir_lpf #(.W(W), .ORDER(2)) u_l2q (.clk, .rst_n, .en(adc_valid), .bw(lpf2_bw), .din(l1q), .dout(l2q));
  mm_timing_rec #(.W(W), .SPS(16)) u_tr (.clk, .rst_n, .en(adc_valid), .i_in(l2i), .q_in(l2q),
                                          .i_s(si), .q_s(sq), .valid(s_valid), .adv(tr_adv), .ret(tr_ret));
  diff_demod #(.W(W)) u_dm (.clk, .rst_n, .in_valid(s_valid), .i_in(si), .q_in(sq),
                            .bit_out(rx_bit), .bit_valid(rx_bit_valid));
endmodule
