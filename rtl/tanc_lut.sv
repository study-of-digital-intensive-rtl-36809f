// tanc_lut: "true arbitrary nonlinearity calibration" of the segmented DTC.
// The coarse (path-selection) DTC has random per-code delay errors, so the
// overall INL is a staircase with one step per coarse code. One signed
// accumulator is kept per coarse code. The coarse code applied to the DTC
// (coarse_obs) is delayed DELAY cycles to line up with the BBPD decision it
// caused (BBPD through z^-1), and that delayed code demultiplexes the decision into its own entry,
// which moves against it (late -> smaller correction). On the output side
// the entry of the coarse code being computed (coarse_rd, one pipeline
// stage ahead of coarse_obs), truncated to OUT_W signed bits,
// is the correction added to the 8 fine-DCW LSBs (zero-order compensation,
// no interpolation). With en low the entries hold; clr zeroes them.
// Output is combinational from coarse_rd (one table read).
// The demux/accumulate/select structure follows the TANC description; the
// accumulator width and the scaling are this design's choices.
module tanc_lut
  import trx_pkg::*;
#(
  parameter int unsigned COARSE_W = 6,
  parameter int unsigned OUT_W    = 8,
  parameter int unsigned FRAC     = 6,
  parameter int unsigned DELAY    = 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic                    clr,
  input  logic [COARSE_W-1:0]     coarse_rd,
  input  logic [COARSE_W-1:0]     coarse_obs,
  input  bbpd_t                   bbpd,
  output logic signed [OUT_W-1:0] corr
);
  localparam int unsigned N     = 1 << COARSE_W;
  localparam int unsigned ACC_W = OUT_W + FRAC;
  localparam logic signed [ACC_W-1:0] AMAX = {1'b0, {(ACC_W-1){1'b1}}};
  localparam logic signed [ACC_W-1:0] AMIN = {1'b1, {(ACC_W-1){1'b0}}};

  logic signed [ACC_W-1:0] lut [N];
  logic [COARSE_W-1:0]     dl [DELAY];
  bbpd_t                   bb_d;
  logic signed [ACC_W-1:0] cur;

  assign cur  = lut[dl[DELAY-1]];
  assign corr = OUT_W'(lut[coarse_rd] >>> FRAC);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DELAY; i++) dl[i] <= '0;
      bb_d <= BB_NONE;
    end else begin
      dl[0] <= coarse_obs;
      for (int i = 1; i < DELAY; i++) dl[i] <= dl[i-1];
      bb_d <= bbpd;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) lut[i] <= '0;
    end else if (clr) begin
      for (int i = 0; i < N; i++) lut[i] <= '0;
    end else if (en) begin
      if (bb_d == BB_LATE && cur != AMIN)       lut[dl[DELAY-1]] <= cur - 1'b1;
      else if (bb_d == BB_EARLY && cur != AMAX) lut[dl[DELAY-1]] <= cur + 1'b1;
    end
  end
endmodule
