// rx_mixer: quadrature down-conversion of the real IF samples.
//   I = x * cos / 128,  Q = -x * sin / 128
// with the 8-bit LO from rx_nco, so a tone at the LO frequency lands at DC
// with half its amplitude in each rail. Registered, one cycle latency per
// en strobe. Heterodyne reception with all-digital quadrature
// down-conversion at 8 MS/s is the thesis'; the scaling is this
// design's choice.
module rx_mixer #(
  parameter int unsigned W = 14
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [W-1:0] din,
  input  logic signed [7:0]   lo_cos,
  input  logic signed [7:0]   lo_sin,
  output logic signed [W-1:0] i_out,
  output logic signed [W-1:0] q_out
);
  logic signed [W+7:0] pi, pq;
  assign pi = (W+8)'(din) * (W+8)'(lo_cos);
  assign pq = -((W+8)'(din) * (W+8)'(lo_sin));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i_out <= '0; q_out <= '0;
    end else if (en) begin
      i_out <= W'(pi >>> 7);
      q_out <= W'(pq >>> 7);
    end
  end
endmodule
