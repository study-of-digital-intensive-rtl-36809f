// semi_digital_fir: raised-cosine semi-digital FIR pulse-shaping filter.
// Duo_P and Duo_N are binary, so no multiplier is needed: each feeds a
// delay line of ORDER+1 flip-flops on the x2 over-sampling clock, and every
// tap switches a current source whose size is the tap weight. Here the
// current summation is represented by an integer sum in unit currents:
//   iout = sum_i COEF[i] * (P[n-i] - N[n-i])
// (a negative weight steers its current to the opposite output). The
// weights are the beta = 0.25 raised-cosine pulse sampled at OSR = 2,
//   h(t) = sinc(t) cos(pi beta t) / (1 - (2 beta t)^2), t = -1.5 .. 1.5,
// scaled to 5-bit signed numbers with the peak at 15: [-3 0 9 15 9 0 -3].
// Output registered, one clock latency plus the 3-sample group delay.
// Order 6, 5-bit weights, OSR 2 and beta 0.25 are the thesis'; the
// integer representation of the output current is this design's.
module semi_digital_fir #(
  parameter int unsigned ORDER  = 6,
  parameter int unsigned COEF_W = 5,
  parameter logic signed [COEF_W-1:0] COEF [ORDER+1] = '{-5'sd3, 5'sd0, 5'sd9, 5'sd15, 5'sd9, 5'sd0, -5'sd3}
) (
  input  logic              clk2x,
  input  logic              rst_n,
  input  logic              duo_p,
  input  logic              duo_n,
  output logic signed [7:0] iout
);
  logic [ORDER:0] dp, dn;
  logic signed [7:0] sum;

  always_comb begin
    sum = '0;
    for (int i = 0; i <= ORDER; i++)
      sum += 8'(COEF[i]) * (8'(dp[i]) - 8'(dn[i]));
  end

  always_ff @(posedge clk2x or negedge rst_n) begin
    if (!rst_n) begin
      dp <= '0; dn <= '0; iout <= '0;
    end else begin
      dp   <= {dp[ORDER-1:0], duo_p};
      dn   <= {dn[ORDER-1:0], duo_n};
      iout <= sum;
    end
  end
endmodule
