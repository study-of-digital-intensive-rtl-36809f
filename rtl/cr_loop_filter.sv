// cr_loop_filter: proportional-integral filter of the carrier-recovery loop,
// run at the 1 MS/s dump rate. For each valid error sample e:
//   integ += e / 2^KI_SHIFT,   freq = integ + e / 2^KP_SHIFT
// The integrator keeps IFRAC fractional bits so that very small integral
// gains still accumulate, and is clamped to +-2^(OUT_W-2); freq is the NCO frequency correction (NCO phase
// units per 8 MS/s sample). Registered output, updated on valid. The
// reduced loop rate is the thesis'; the PI form and gains are this
// design's choices. Only the low OUT_W bits of the wide sum are kept: with
// the clamp at +-2^(OUT_W-2) and the proportional term below 2^(IN_W-KP_SHIFT)
// the sum always fits, so the unused upper bits are sign copies.
module cr_loop_filter #(
  parameter int unsigned IN_W     = 18,
  parameter int unsigned OUT_W    = 16,
  parameter int unsigned KP_SHIFT = 6,
  parameter int unsigned KI_SHIFT = 12,
  parameter int unsigned IFRAC    = 10
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    valid,
  input  logic signed [IN_W-1:0]  err,
  output logic signed [OUT_W-1:0] freq
);
  localparam int unsigned AW = OUT_W + IFRAC + 2;
  localparam logic signed [AW-1:0] LIM = AW'(1) <<< (OUT_W - 2 + IFRAC);

  logic signed [AW-1:0] integ, inxt, f;

  always_comb begin
    inxt = integ + ((AW'(err) <<< IFRAC) >>> KI_SHIFT);
    if (inxt > LIM)       inxt = LIM;
    else if (inxt < -LIM) inxt = -LIM;
    f = (inxt >>> IFRAC) + (AW'(err) >>> KP_SHIFT);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      integ <= '0; freq <= '0;
    end else if (valid) begin
      integ <= inxt;
      freq  <= OUT_W'(f);
    end
  end
endmodule
