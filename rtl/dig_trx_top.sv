// dig_trx_top: the digital logic of the ring-oscillator sub-GHz IoT
// transceiver, next to the independent 60 GHz differential duobinary
// modulator.
// Transceiver (GMSK, 500 kb/s, 40 MHz reference):
//  * TX: tx_dbb turns the data into an 8-bit frequency offset that is added
//    to the fractional FCW of the injection-locked PLL, so the PLL itself is
//    the frequency modulator (direct FM).
//  * PLL: ilpll_ctrl holds the FCW accumulator, the DTC control word with
//    its gain / TANC / doubler calibrations, the bang-bang loop filter with
//    its DSM and the self-clocked fine-code update, and the FLL. The DCO,
//    DTC, doubler and BBPD are timing circuits outside this module: their
//    controls are outputs and the BBPD decision and DCO count are inputs.
//  * RX: rx_if demodulates the 1 MHz IF sampled by the SAR ADC at 8 MS/s.
//  * tx_en selects TX mode (modulation on, RX IF stage idle) or RX mode
//    (single-tone LO, RX IF stage running).
// Duobinary modulator: duobinary_mod on its own x2 over-sampling clock.
// Clocks: clk_ref (reference, 40 MHz), clk_dsm (divided DCO), clk_vg (the
// fine varactor stage's gate node), clk_adc (8 MHz), clk2x (duobinary).
module dig_trx_top
  import trx_pkg::*;
(
  input  logic                    clk_ref,
  input  logic                    clk_dsm,
  input  logic                    clk_vg,
  input  logic                    clk_adc,
  input  logic                    clk2x,
  input  logic                    rst_n,
  // mode and TX data
  input  logic                    tx_en,
  input  logic                    tx_clk,
  input  logic                    tx_data,
  input  logic [7:0]              kmod,
  // PLL configuration and timing-circuit interface
  input  logic [7:0]              fcw_int,
  input  logic [FRAC_W-1:0]       fcw_frac,
  input  logic                    fll_en,
  input  logic                    frac_en,
  input  logic                    gain_cal_en,
  input  logic                    tanc_en,
  input  logic                    dcc_en,
  input  logic                    refd_en,
  input  bbpd_t                   bbpd,
  input  logic [7:0]              dco_cnt,
  output logic [7:0]              n_sel,
  output logic [DTC_C_W-1:0]      dtc_coarse,
  output logic [DTC_F_W-1:0]      dtc_fine,
  output logic                    edge_odd,
  output logic [DCO_C_W-1:0]      dco_coarse,
  output logic [(1<<DCO_M_W)-2:0] dco_medium,
  output logic [(1<<DCO_F_W)-2:0] dco_fine,
  output logic                    fll_locked,
  output logic [GAIN_W-1:0]       dtc_gc,
  output logic [GAIN_W-1:0]       dtc_gf,
  output logic signed [7:0]       fcw_mod,
  output logic                    tx_sym_en,
  // RX IF stage
  input  logic                    adc_valid,
  input  logic signed [9:0]       adc_data,
  input  logic [15:0]             nco_fcw,
  input  logic [2:0]              lpf1_bw,
  input  logic [2:0]              lpf2_bw,
  output logic                    rx_bit,
  output logic                    rx_bit_valid,
  output logic signed [15:0]      cr_freq,
  output logic                    tr_adv,
  output logic                    tr_ret,
  // duobinary modulator
  input  logic                    nrz_in,
  output logic                    duo_p,
  output logic                    duo_n,
  output logic signed [7:0]       db_iout
);
  tx_dbb u_tx (.clk(clk_ref), .rst_n, .tx_en, .tx_clk, .tx_data, .kmod,
               .fcw_mod, .sym_en(tx_sym_en));

  ilpll_ctrl u_pll (
    .clk_ref, .clk_dsm, .clk_vg, .rst_n, .fcw_int, .fcw_frac,
    .fcw_mod(tx_en ? fcw_mod : 8'sd0), .fll_en, .frac_en, .gain_cal_en, .tanc_en,
    .dcc_en, .refd_en, .bbpd, .dco_cnt, .n_sel, .dtc_coarse, .dtc_fine,
    .edge_odd, .dco_coarse, .dco_medium, .dco_fine, .fll_locked,
    .gc(dtc_gc), .gf(dtc_gf));

  rx_if u_rx (.clk(clk_adc), .rst_n, .adc_valid(adc_valid && !tx_en), .adc_data,
              .nco_fcw, .lpf1_bw, .lpf2_bw, .rx_bit, .rx_bit_valid, .cr_freq,
              .tr_adv, .tr_ret);

  duobinary_mod u_db (.clk2x, .rst_n, .nrz_in, .duo_p, .duo_n, .iout(db_iout));
endmodule
