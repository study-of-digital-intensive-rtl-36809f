// dtc_gain_lms: sign-data LMS gain calibration of one DTC stage.
// The stage's control code is delayed DELAY cycles so it lines up with the
// BBPD decision it caused (the BBPD itself passes one register, z^-1).
// The code is centred (code - 2^(CODE_W-1)), multiplied by the +-1 BBPD
// decision, scaled by 2^-MU_SHIFT and subtracted from a saturating ACC_W-bit
// accumulator: a DTC whose gain is too high makes the injected edge late
// (BBPD = +1) for large codes, so the gain is lowered. A first-order DSM
// requantises the accumulator to the OUT_W-bit gain word used by the DCW
// multiplier. With en low the accumulator holds. Latency from a BBPD input
// to a gain change: 2 cycles. The structure (delay alignment, multiply,
// 2^-k, 16-bit sum, DSM to 10 bits) follows the gain-calibration diagram;
// the centring, the sign convention and the initial value are this design's
// choices.
module dtc_gain_lms
  import trx_pkg::*;
#(
  parameter int unsigned CODE_W   = 6,
  parameter int unsigned DELAY    = 2,
  parameter int unsigned MU_SHIFT = 1,
  parameter int unsigned ACC_W    = 16,
  parameter int unsigned OUT_W    = 10,
  parameter logic [ACC_W-1:0] INIT = ACC_W'(512) << (ACC_W - OUT_W)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic [CODE_W-1:0] code,
  input  bbpd_t             bbpd,
  output logic [OUT_W-1:0]  gain,
  output logic [ACC_W-1:0]  acc
);
  logic [CODE_W-1:0] dl [DELAY];
  bbpd_t             bb_d;
  logic signed [CODE_W:0]   cen;
  logic signed [CODE_W+2:0] prod;
  logic signed [ACC_W+1:0]  nxt;

  always_comb begin
    cen  = $signed({1'b0, dl[DELAY-1]}) - (CODE_W+1)'(1 << (CODE_W-1));
    prod = (CODE_W+3)'(cen) * (CODE_W+3)'(bb_d);
    nxt  = $signed({2'b00, acc}) - (ACC_W+2)'(prod >>> MU_SHIFT);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DELAY; i++) dl[i] <= '0;
      bb_d <= BB_NONE;
      acc  <= INIT;
    end else begin
      dl[0] <= code;
      for (int i = 1; i < DELAY; i++) dl[i] <= dl[i-1];
      bb_d <= bbpd;
      if (en) begin
        if (nxt < 0)                           acc <= '0;
        else if (nxt > (ACC_W+2)'({ACC_W{1'b1}})) acc <= '1;
        else                                   acc <= nxt[ACC_W-1:0];
      end
    end
  end

  dsm1 #(.IN_W(ACC_W), .OUT_W(OUT_W)) u_dsm
    (.clk, .rst_n, .en(1'b1), .din(acc), .dout(gain));
endmodule
