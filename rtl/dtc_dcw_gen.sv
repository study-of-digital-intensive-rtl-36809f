// dtc_dcw_gen: DTC control-word path of the fractional-N IL-PLL.
// The accumulated fractional phase (FRAC_W bits, one DCO period = 2^FRAC_W)
// is normalised by the coarse gain word: dcw = phase * gc / 2^12, a 14-bit
// DTC control word DCW[13:0]. Its 6 MSBs drive the path-selection coarse
// DTC directly. Its 8 LSBs get the TANC correction of the current coarse
// code and the reference-doubler correction added, plus a bias of half the
// fine range so that negative corrections stay representable; the 9-bit
// sum (fine_pre, 256 = one coarse LSB) is normalised by the fine gain word,
// fine = fine_pre * gf / 2^10, and saturated to the 8-bit fine DTC code.
// Ideal gains: gc = 1024 * T_dco / (64 * coarse LSB), gf = 4 * coarse LSB /
// fine LSB. Two pipeline stages: dcw is registered one cycle after phase,
// and coarse, fine_pre and fine one cycle after dcw. tanc and dcc must be
// valid in the cycle dcw is (they are looked up from dcw[13:8]).
// The 6/8 split, the TANC addition to the LSBs and the two gain
// normalisations follow the calibration diagram; the scalings and the bias
// are this design's choices.
module dtc_dcw_gen #(
  parameter int unsigned FRAC_W   = 16,
  parameter int unsigned COARSE_W = 6,
  parameter int unsigned FINE_W   = 8,
  parameter int unsigned GAIN_W   = 10
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [FRAC_W-1:0]          phase,
  input  logic [GAIN_W-1:0]          gc,
  input  logic [GAIN_W-1:0]          gf,
  input  logic signed [7:0]          tanc,
  input  logic signed [7:0]          dcc,
  output logic [COARSE_W+FINE_W-1:0] dcw,
  output logic [COARSE_W-1:0]        coarse,
  output logic [FINE_W:0]            fine_pre,
  output logic [FINE_W-1:0]          fine
);
  localparam int unsigned DCW_W = COARSE_W + FINE_W;
  localparam int unsigned PW    = FRAC_W + GAIN_W;

  logic [PW-1:0]          prod;
  logic [PW-1:0]          dcw_full;
  logic [DCW_W-1:0]       dcw_c;
  logic signed [FINE_W+2:0] fsum;
  logic [FINE_W:0]        fpre_c;
  logic [FINE_W+GAIN_W:0] fprod;
  logic [FINE_W-1:0]      fine_c;

  always_comb begin
    prod     = PW'(phase) * PW'(gc);
    dcw_full = prod >> 12;
    dcw_c    = (dcw_full > PW'({DCW_W{1'b1}})) ? {DCW_W{1'b1}} : dcw_full[DCW_W-1:0];
    fsum     = (FINE_W+3)'({1'b0, dcw[FINE_W-1:0]})
             + (FINE_W+3)'(tanc) + (FINE_W+3)'(dcc) + (FINE_W+3)'(1 << (FINE_W-1));
    if (fsum < 0)                                  fpre_c = '0;
    else if (fsum > (FINE_W+3)'({(FINE_W+1){1'b1}})) fpre_c = '1;
    else                                           fpre_c = fsum[FINE_W:0];
    fprod    = (FINE_W+GAIN_W+1)'(fpre_c) * (FINE_W+GAIN_W+1)'(gf);
    fine_c   = ((fprod >> 10) > (FINE_W+GAIN_W+1)'({FINE_W{1'b1}}))
             ? {FINE_W{1'b1}} : FINE_W'(fprod >> 10);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dcw <= '0; coarse <= '0; fine_pre <= '0; fine <= '0;
    end else begin
      dcw      <= dcw_c;
      coarse   <= dcw[DCW_W-1:FINE_W];
      fine_pre <= fpre_c;
      fine     <= fine_c;
    end
  end
endmodule
