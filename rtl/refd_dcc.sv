// refd_dcc: duty-cycle error calibration of the reference doubler.
// A doubler makes every second injection edge come from the falling edge of
// the reference, so a duty-cycle error shifts alternate edges in opposite
// directions. The BBPD decision (through z^-1) is multiplied by the edge
// parity of the edge that was applied (odd_obs) delayed DELAY cycles, and the product moves a
// saturating accumulator against it. The correction, +corr on odd edges and
// -corr on even edges, is added to the fine DTC word (the table of errors
// and calibrations assigns the doubler error to the fine DTC). Output is
// combinational from the parity of the word being computed (odd); en low holds the accumulator.
// The correlation scheme is this design's choice; the thesis says only
// that each calibration extracts its error from the shared BBPD statistics.
module refd_dcc
  import trx_pkg::*;
#(
  parameter int unsigned OUT_W = 8,
  parameter int unsigned FRAC  = 6,
  parameter int unsigned DELAY = 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic                    odd,
  input  logic                    odd_obs,
  input  bbpd_t                   bbpd,
  output logic signed [OUT_W-1:0] corr
);
  localparam int unsigned ACC_W = OUT_W + FRAC;
  localparam logic signed [ACC_W-1:0] AMAX = {1'b0, {(ACC_W-1){1'b1}}};
  localparam logic signed [ACC_W-1:0] AMIN = {1'b1, {(ACC_W-1){1'b0}}};

  logic signed [ACC_W-1:0] acc;
  logic [DELAY-1:0]        par_d;
  bbpd_t                   bb_d;
  logic                    late_odd, early_odd;
  logic signed [OUT_W-1:0] mag;

  // a late decision on an odd edge, or an early one on an even edge, means
  // odd edges need less delay
  assign late_odd  = (bb_d == BB_LATE  &&  par_d[DELAY-1]) || (bb_d == BB_EARLY && !par_d[DELAY-1]);
  assign early_odd = (bb_d == BB_EARLY &&  par_d[DELAY-1]) || (bb_d == BB_LATE  && !par_d[DELAY-1]);
  assign mag  = OUT_W'(acc >>> FRAC);
  assign corr = odd ? mag : -mag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0; par_d <= '0; bb_d <= BB_NONE;
    end else begin
      par_d <= {par_d[DELAY-2:0], odd_obs};
      bb_d  <= bbpd;
      if (en) begin
        if (late_odd && acc != AMIN)       acc <= acc - 1'b1;
        else if (early_odd && acc != AMAX) acc <= acc + 1'b1;
      end
    end
  end
endmodule
