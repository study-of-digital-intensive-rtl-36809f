// rx_iir_lpf: tunable-bandwidth low-pass IIR of the RX IF stage.
// A cascade of ORDER identical one-pole sections,
//   y[n] = y[n-1] + (x[n] - y[n-1]) / 2^bw
// with the shift bw (1..7) chosen at run time; each section has unity DC
// gain and a -3 dB corner near fs / (2 pi 2^bw). The first stage of the
// receiver uses ORDER = 1 (short delay inside the carrier-recovery loop),
// the second ORDER = 2 (steeper roll-off against blockers). Sections carry
// FB fractional bits. One output per en strobe; each section adds one
// register. The thesis gives the two-stage arrangement and the reasons
// for it; the one-pole sections and their tuning by shift are this design's
// choices.
module rx_iir_lpf #(
  parameter int unsigned W     = 14,
  parameter int unsigned ORDER = 1,
  parameter int unsigned FB    = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic [2:0]          bw,
  input  logic signed [W-1:0] din,
  output logic signed [W-1:0] dout
);
  logic signed [W+FB-1:0] st [ORDER];
  logic signed [W+FB-1:0] xin [ORDER];

  always_comb begin
    xin[0] = (W+FB)'(din) <<< FB;
    for (int i = 1; i < ORDER; i++) xin[i] = st[i-1];
  end
  assign dout = W'(st[ORDER-1] >>> FB);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ORDER; i++) st[i] <= '0;
    end else if (en) begin
      for (int i = 0; i < ORDER; i++)
        st[i] <= st[i] + ((xin[i] - st[i]) >>> ((bw == 3'd0) ? 3'd1 : bw));
    end
  end
endmodule
