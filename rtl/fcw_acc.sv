// fcw_acc: frequency-control-word accumulator of the fractional-N IL-PLL.
// The FCW is N + frac/2^FRAC_W. In TX mode a signed modulation offset
// (fcw_mod, shifted left by MOD_SHIFT, in units of 2^-FRAC_W) is added to the
// fraction, which makes the PLL a direct frequency modulator. Each reference
// cycle the fraction is accumulated modulo 1: the accumulator value is the
// fractional phase the DTC must delay the injected edge by (phase, in
// DCO periods x 2^FRAC_W), and the carry/borrow selects N+1 / N-1 DCO
// cycles for that reference period (n_sel). Registered outputs, one
// reference cycle latency. The accumulate-then-normalise order follows the
// calibration diagram; the widths and the modulation scaling are this
// design's choices.
module fcw_acc #(
  parameter int unsigned FRAC_W    = 16,
  parameter int unsigned N_W       = 8,
  parameter int unsigned MOD_W     = 8,
  parameter int unsigned MOD_SHIFT = 6
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [N_W-1:0]          fcw_int,
  input  logic [FRAC_W-1:0]       fcw_frac,
  input  logic signed [MOD_W-1:0] fcw_mod,
  output logic [FRAC_W-1:0]       phase,
  output logic [N_W-1:0]          n_sel
);
  logic signed [FRAC_W+2:0] inc, nxt;

  always_comb begin
    inc = (FRAC_W+3)'({1'b0, fcw_frac}) + ((FRAC_W+3)'(fcw_mod) <<< MOD_SHIFT);
    nxt = (FRAC_W+3)'({1'b0, phase}) + inc;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= '0;
      n_sel <= '0;
    end else begin
      phase <= nxt[FRAC_W-1:0];
      // integer part of the increment: floor(nxt / 2^FRAC_W)
      n_sel <= fcw_int + N_W'(nxt >>> FRAC_W);
    end
  end
endmodule
