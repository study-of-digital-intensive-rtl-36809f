// gauss_filter: GMSK Gaussian pulse shaping (BT = 0.5) at 5 MHz.
// The 0.5 MHz symbol held at its input is sampled on each 5 MHz strobe
// (zero-order hold, x10 up-sampling) into a 13-tap delay line. The taps are
// the BT = 0.5 Gaussian h[n] = exp(-n^2 / (2 s^2)), s = sqrt(ln 2)/(2 pi BT)
// symbols = 2.65 samples, scaled so that they sum to 64:
//   [1 2 3 5 7 9 10 9 7 5 3 2 1]
// so the DC gain is exactly 1 before the output shift. Output = sum / 16
// (x4 over the input scale) in 10 signed bits, registered on the strobe:
// latency 1 strobe for the register plus 6 strobes of group delay.
// BT, the 5 MHz rate and the 8-in / 10-out widths follow the TX baseband
// diagram; the tap count and scaling are this design's choices.
module gauss_filter (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_en,
  input  logic signed [7:0] din,
  output logic signed [9:0] dout
);
  localparam int NTAP = 13;
  localparam int signed COEF [NTAP] = '{1, 2, 3, 5, 7, 9, 10, 9, 7, 5, 3, 2, 1};

  logic signed [7:0]  dl [NTAP];
  logic signed [15:0] acc;

  always_comb begin
    acc = '0;
    for (int i = 0; i < NTAP; i++) acc += 16'(dl[i]) * 16'(COEF[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NTAP; i++) dl[i] <= '0;
      dout <= '0;
    end else if (in_en) begin
      dl[0] <= din;
      for (int i = 1; i < NTAP; i++) dl[i] <= dl[i-1];
      dout <= 10'(acc >>> 4);
    end
  end
endmodule
