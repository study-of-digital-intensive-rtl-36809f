// trx_pkg: widths and small types shared by the sub-GHz transceiver digital
// blocks. The TX baseband widths (8/10/12/8 bits) and the DTC calibration
// widths (6-bit coarse, 8-bit fine, 16-bit gain accumulator, 10-bit gain)
// are the ones printed in the block diagrams; the DCO code widths and the
// BBPD encoding are this design's choices.
package trx_pkg;
  // TX digital baseband
  localparam int unsigned SYM_W    = 8;   // modulator output
  localparam int unsigned GAUSS_W  = 10;  // Gaussian filter output
  localparam int unsigned INTERP_W = 12;  // interpolator output
  localparam int unsigned MOD_W    = 8;   // K_MOD output added to the FCW

  // DTC control word split (Table 3.6)
  localparam int unsigned DTC_C_W  = 6;
  localparam int unsigned DTC_F_W  = 8;
  localparam int unsigned DCW_W    = DTC_C_W + DTC_F_W;  // 14-bit DCW[13:0]
  localparam int unsigned GAIN_W   = 10;  // LMS gain word after the DSM
  localparam int unsigned GACC_W   = 16;  // LMS accumulator
  localparam int unsigned FRAC_W   = 16;  // fractional FCW / phase

  // DCO code widths (this design's choice)
  localparam int unsigned DCO_C_W  = 3;   // path-selection coarse stage
  localparam int unsigned DCO_M_W  = 5;   // medium varactor bank (binary)
  localparam int unsigned DCO_F_W  = 5;   // fine varactor bank (binary)

  // Bang-bang phase detector sample: +1 = injected (DTC) edge late,
  // -1 = early, 0 = no decision this cycle. Two bits, as BBPD[1:0].
  typedef logic signed [1:0] bbpd_t;
  localparam bbpd_t BB_LATE  = 2'sd1;
  localparam bbpd_t BB_EARLY = -2'sd1;
  localparam bbpd_t BB_NONE  = 2'sd0;
endpackage
