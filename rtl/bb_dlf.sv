// bb_dlf: proportional-integral digital loop filter of the phase-lock path.
// Each reference cycle with a BBPD decision both paths act on its sign:
//   integ  += bbpd * INT_STEP                 (integral path)
//   out     = (integ << ALPHA) + (bbpd * PROP_STEP << BETA) + MID
// and the output is split into a DCO fine code of OUT_W integer bits
// (bits [OUT_LSB+OUT_W-1:OUT_LSB]) and FRAC_OUT fractional bits below it,
// which the fine-stage DSM dithers. The output saturates at the code range.
// Polarity: bbpd = +1 means the injected reference edge came after the DCO
// edge, i.e. the DCO runs fast; a larger fine code adds capacitance and
// slows it, so the code moves up on +1. Registered output, one cycle
// latency. clr (synchronous) returns the filter to mid-scale, e.g. while
// the FLL is still acquiring. The two-path structure, the shift gains ALPHA = 4 and BETA = 6,
// the +-1023 integral step and the 5-bit output taken from bits [20:16]
// with a mid-scale offset of 2^20 follow the thesis' loop-filter
// example; saturation and the fractional output are this design's choices.
module bb_dlf
  import trx_pkg::*;
#(
  parameter int unsigned ALPHA    = 4,
  parameter int unsigned BETA     = 6,
  parameter int unsigned INT_STEP = 1023,
  parameter int unsigned PROP_STEP= 1023,
  parameter int unsigned OUT_W    = 5,
  parameter int unsigned OUT_LSB  = 16,
  parameter int unsigned FRAC_OUT = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic                clr,
  input  bbpd_t               bbpd,
  output logic [OUT_W-1:0]    code_int,
  output logic [FRAC_OUT-1:0] code_frac
);
  localparam int unsigned W   = 31;
  localparam int unsigned TOP = OUT_LSB + OUT_W;          // first bit above the code
  localparam logic signed [W-1:0] MID  = W'(1) <<< (TOP - 1);
  localparam logic signed [W-1:0] IMAX = (W'(1) <<< (TOP - 1 - ALPHA));

  logic signed [W-1:0] integ, ipath, ppath, sum;

  always_comb begin
    ipath = integ <<< ALPHA;
    ppath = (bbpd == BB_LATE)  ? (W'(PROP_STEP) <<< BETA) :
            (bbpd == BB_EARLY) ? -(W'(PROP_STEP) <<< BETA) : '0;
    sum   = ipath + ppath + MID;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      integ     <= '0;
      code_int  <= OUT_W'(1 << (OUT_W-1));
      code_frac <= '0;
    end else if (clr) begin
      integ     <= '0;
      code_int  <= OUT_W'(1 << (OUT_W-1));
      code_frac <= '0;
    end else if (en) begin
      if (bbpd == BB_LATE && integ < IMAX)        integ <= integ + W'(INT_STEP);
      else if (bbpd == BB_EARLY && integ > -IMAX) integ <= integ - W'(INT_STEP);
      if (sum < 0) begin
        code_int <= '0; code_frac <= '0;
      end else if (sum >= (W'(1) <<< TOP)) begin
        code_int <= '1; code_frac <= '1;
      end else begin
        code_int  <= sum[TOP-1:OUT_LSB];
        code_frac <= sum[OUT_LSB-1:OUT_LSB-FRAC_OUT];
      end
    end
  end
endmodule
