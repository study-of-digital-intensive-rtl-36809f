// rx_hpf: DC-blocking high-pass IIR at the head of the RX IF stage.
// The 10-bit two's-complement ADC sample is scaled to W bits (x4) and
//   y[n] = x[n] - x[n-1] + y[n-1] - y[n-1] / 2^K
// a first-order high-pass with its pole at 1 - 2^-K (corner about
// fs / (2 pi 2^K): 20 kHz at 8 MS/s for K = 6), which removes the ADC and
// front-end DC offset and low-frequency noise while passing the 1 MHz IF.
// One output per en strobe, registered (one cycle latency). The thesis
// names a high-pass IIR for DC and low-frequency removal; the order and
// the pole are this design's choices.
module rx_hpf #(
  parameter int unsigned IN_W = 10,
  parameter int unsigned W    = 14,
  parameter int unsigned K    = 6
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [IN_W-1:0] din,
  output logic signed [W-1:0]    dout
);
  logic signed [W-1:0]   x1;
  logic signed [W+K:0]   y;      // K extra fractional bits
  logic signed [W-1:0]   xs;
  logic signed [W+K:0]   ynxt;

  assign xs   = W'(din) <<< 2;
  assign ynxt = y + ((W+K+1)'(xs - x1) <<< K) - (y >>> K);
  assign dout = W'(y >>> K);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x1 <= '0; y <= '0;
    end else if (en) begin
      x1 <= xs;
      y  <= ynxt;
    end
  end
endmodule
