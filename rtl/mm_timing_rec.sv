// mm_timing_rec: Mueller-Muller symbol timing recovery and decimation,
// 8 MS/s -> 0.5 MS/s (SPS = 16 samples per symbol).
// GMSK carries its data in the instantaneous frequency, which is a
// Gaussian-filtered NRZ (a PAM waveform), so the timing error is taken from
// the discriminator f[n] = I[n-1] Q[n] - Q[n-1] I[n] (scaled by 2^-FSH).
// A modulo counter raises a strobe every 'period' samples; at each strobe
// the Mueller-Muller detector
//   e_k = sgn(f_{k-1}) f_k - sgn(f_k) f_{k-1}
// is added to an accumulator. When the accumulator passes +TH the next
// period is SPS+1 (sampling was early), when it passes -TH the next period
// is SPS-1; the accumulator then restarts. At each strobe the I/Q sample is
// passed out with 'valid' for one cycle. Mueller-Muller recovery of the
// 8 -> 0.5 MS/s decimation phase is the thesis'; using the
// discriminator as its input and the +-1 sample stepping are this
// design's choices.
module mm_timing_rec #(
  parameter int unsigned W   = 14,
  parameter int unsigned SPS = 16,
  parameter int unsigned FSH = 10,
  parameter int unsigned TH  = 2048
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [W-1:0] i_in,
  input  logic signed [W-1:0] q_in,
  output logic signed [W-1:0] i_s,
  output logic signed [W-1:0] q_s,
  output logic                valid,
  output logic                adv,     // a short period was taken
  output logic                ret      // a long period was taken
);
  localparam int unsigned FW = 2*W + 1;
  logic signed [W-1:0]  i1, q1;
  logic signed [FW-1:0] fraw;
  logic signed [W-1:0]  f, fk1;
  logic [$clog2(SPS+2)-1:0] cnt, period;
  logic signed [W+7:0]  acc, e, anxt;
  logic                 strobe;
  localparam logic signed [W+7:0] TH_P = (W+8)'(TH);
  localparam logic signed [W+7:0] TH_N = -(W+8)'(TH);

  assign fraw   = FW'(i1) * FW'(q_in) - FW'(q1) * FW'(i_in);
  assign f      = W'(fraw >>> FSH);
  assign strobe = en && (cnt == period - 1'b1);
  assign e      = (fk1[W-1] ? -(W+8)'(f) : (W+8)'(f)) - (f[W-1] ? -(W+8)'(fk1) : (W+8)'(fk1));
  assign anxt   = acc + e;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i1 <= '0; q1 <= '0; fk1 <= '0; cnt <= '0; period <= SPS[$clog2(SPS+2)-1:0];
      acc <= '0; i_s <= '0; q_s <= '0; valid <= 1'b0; adv <= 1'b0; ret <= 1'b0;
    end else begin
      valid <= 1'b0; adv <= 1'b0; ret <= 1'b0;
      if (en) begin
        i1 <= i_in; q1 <= q_in;
        if (strobe) begin
          cnt   <= '0;
          fk1   <= f;
          i_s   <= i_in;
          q_s   <= q_in;
          valid <= 1'b1;
          if (anxt > TH_P) begin
            period <= $clog2(SPS+2)'(SPS + 1); acc <= '0; ret <= 1'b1;
          end else if (anxt < TH_N) begin
            period <= $clog2(SPS+2)'(SPS - 1); acc <= '0; adv <= 1'b1;
          end else begin
            period <= $clog2(SPS+2)'(SPS); acc <= anxt;
          end
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end
endmodule
