// ilpll_ctrl: digital control of the fractional-N injection-locked PLL.
// The timing blocks (reference doubler, two-stage DTC, ring DCO with its
// injection MUX and sub-sampling BBPD) are circuits outside this module;
// everything here runs on their single shared BBPD decision.
//  * fcw_acc: accumulates the fractional FCW (plus the TX modulation) into
//    the DTC phase and the per-cycle DCO count N / N+1 (n_sel).
//  * dtc_dcw_gen: phase x coarse gain -> 14-bit DCW; 6 MSBs to the coarse
//    DTC, 8 LSBs + TANC + doubler correction x fine gain -> fine DTC.
//  * dtc_gain_lms (x2): LMS gain calibration of the coarse and fine stages.
//  * tanc_lut: per-coarse-code nonlinearity correction.
//  * refd_dcc: duty-cycle correction of the reference doubler.
//  * bb_dlf -> dsm1 (on clk_dsm, a divided DCO clock) -> therm_dec ->
//    fine_code_sync (on clk_vg): phase-lock path to the DCO fine bank.
//  * fll_ctrl -> therm_dec: frequency-lock path to the coarse/medium banks.
// fll_en runs the frequency-lock path; it freezes the coarse/medium codes
// once locked and is lowered for a cycle to re-acquire after an FCW change.
// Modes: frac_en = 0 is integer-N (phase held at 0, DTC at a fixed code);
// gain_cal_en, tanc_en and dcc_en switch the three calibrations; refd_en
// says the doubler is in use (alternate edges, parity output edge_odd).
// Timing on clk_ref: phase +1, DCW +2, DTC codes +3 cycles after the FCW;
// the BBPD decision is expected one cycle after the DTC codes it judges.
// The fine-code word crosses into clk_dsm through two registers and is
// taken only when two successive samples agree.
// The LMS instances' full-precision accumulators (.acc) and the unscaled
// fine word of dtc_dcw_gen (fine_pre) are observation points that this
// module does not need, so they are left open / unread on purpose.
module ilpll_ctrl
  import trx_pkg::*;
#(
  parameter int unsigned N_W = 8
) (
  input  logic                    clk_ref,
  input  logic                    clk_dsm,
  input  logic                    clk_vg,
  input  logic                    rst_n,
  input  logic [N_W-1:0]          fcw_int,
  input  logic [FRAC_W-1:0]       fcw_frac,
  input  logic signed [MOD_W-1:0] fcw_mod,
  input  logic                    fll_en,
  input  logic                    frac_en,
  input  logic                    gain_cal_en,
  input  logic                    tanc_en,
  input  logic                    dcc_en,
  input  logic                    refd_en,
  input  bbpd_t                   bbpd,
  input  logic [N_W-1:0]          dco_cnt,
  output logic [N_W-1:0]          n_sel,
  output logic [DTC_C_W-1:0]      dtc_coarse,
  output logic [DTC_F_W-1:0]      dtc_fine,
  output logic                    edge_odd,
  output logic [DCO_C_W-1:0]      dco_coarse,
  output logic [(1<<DCO_M_W)-2:0] dco_medium,
  output logic [(1<<DCO_F_W)-2:0] dco_fine,
  output logic                    fll_locked,
  output logic [GAIN_W-1:0]       gc,
  output logic [GAIN_W-1:0]       gf
);
  logic [FRAC_W-1:0] phase, phase_m;
  logic [N_W-1:0]    n_acc;
  logic [DCW_W-1:0]  dcw;
  logic [DTC_F_W:0]  fine_pre;
  logic signed [7:0] tanc, dcc;
  logic              par0, par1, par2;
  logic [DCO_M_W-1:0] med_bin;
  logic [DCO_F_W-1:0] fi_int, fi_dsm;
  logic [7:0]         fi_frac;
  logic [DCO_F_W+7:0] fw_s1, fw_s2, fw_ok;
  logic [(1<<DCO_F_W)-2:0] fine_th;
  logic [N_W-1:0]    n_int;
  logic [DTC_F_W-1:0] fine_res;

  // ---------------- FCW accumulator ----------------
  fcw_acc #(.FRAC_W(FRAC_W), .N_W(N_W), .MOD_W(MOD_W)) u_acc (
    .clk(clk_ref), .rst_n, .fcw_int, .fcw_frac(frac_en ? fcw_frac : '0),
    .fcw_mod(frac_en ? fcw_mod : '0), .phase, .n_sel(n_acc));
  assign phase_m = frac_en ? phase : '0;

  // integer-N: divide value straight from the FCW
  assign n_int = fcw_int;
  always_ff @(posedge clk_ref or negedge rst_n)
    if (!rst_n) n_sel <= '0;
    else        n_sel <= frac_en ? n_acc : n_int;

  // doubled-reference edge parity, aligned with each pipeline stage
  always_ff @(posedge clk_ref or negedge rst_n) begin
    if (!rst_n) begin
      par0 <= 1'b0; par1 <= 1'b0; par2 <= 1'b0;
    end else begin
      par0 <= refd_en ? ~par0 : 1'b0;
      par1 <= par0;
      par2 <= par1;
    end
  end
  assign edge_odd = par2;

  // ---------------- DTC control word and calibrations ----------------
  dtc_dcw_gen #(.FRAC_W(FRAC_W), .COARSE_W(DTC_C_W), .FINE_W(DTC_F_W), .GAIN_W(GAIN_W)) u_dcw (
    .clk(clk_ref), .rst_n, .phase(phase_m), .gc, .gf, .tanc, .dcc,
    .dcw, .coarse(dtc_coarse), .fine_pre, .fine(dtc_fine));

  dtc_gain_lms #(.CODE_W(DTC_C_W), .DELAY(2), .MU_SHIFT(1), .ACC_W(GACC_W), .OUT_W(GAIN_W),
                 .INIT(GACC_W'(512) << (GACC_W - GAIN_W))) u_lms_c (
    .clk(clk_ref), .rst_n, .en(gain_cal_en && frac_en), .code(dtc_coarse), .bbpd,
    .gain(gc), .acc());

  // fine residue of the DCW, aligned with dtc_fine; the fine gain is
  // estimated from it alone so that the TANC and doubler offsets, which
  // also pass through the fine stage, do not bias the estimate
  always_ff @(posedge clk_ref or negedge rst_n)
    if (!rst_n) fine_res <= '0;
    else        fine_res <= dcw[DTC_F_W-1:0];

  dtc_gain_lms #(.CODE_W(DTC_F_W), .DELAY(2), .MU_SHIFT(2), .ACC_W(GACC_W), .OUT_W(GAIN_W),
                 .INIT(GACC_W'(512) << (GACC_W - GAIN_W))) u_lms_f (
    .clk(clk_ref), .rst_n, .en(gain_cal_en && frac_en), .code(fine_res), .bbpd,
    .gain(gf), .acc());

  tanc_lut #(.COARSE_W(DTC_C_W), .OUT_W(8), .FRAC(6), .DELAY(2)) u_tanc (
    .clk(clk_ref), .rst_n, .en(tanc_en && frac_en), .clr(!frac_en),
    .coarse_rd(dcw[DCW_W-1:DTC_F_W]), .coarse_obs(dtc_coarse), .bbpd, .corr(tanc));

  refd_dcc #(.OUT_W(8), .FRAC(6), .DELAY(2)) u_dcc (
    .clk(clk_ref), .rst_n, .en(dcc_en && refd_en), .odd(par1), .odd_obs(par2),
    .bbpd, .corr(dcc));

  // ---------------- phase-lock path: DLF -> DSM -> fine bank ----------------
  bb_dlf u_dlf (.clk(clk_ref), .rst_n, .en(1'b1), .clr(!fll_locked), .bbpd,
                .code_int(fi_int), .code_frac(fi_frac));

  always_ff @(posedge clk_dsm or negedge rst_n) begin
    if (!rst_n) begin
      fw_s1 <= '0; fw_s2 <= '0; fw_ok <= '0;
    end else begin
      fw_s1 <= {fi_int, fi_frac};
      fw_s2 <= fw_s1;
      if (fw_s1 == fw_s2) fw_ok <= fw_s2;
    end
  end

  dsm1 #(.IN_W(DCO_F_W+8), .OUT_W(DCO_F_W)) u_fdsm (
    .clk(clk_dsm), .rst_n, .en(1'b1), .din(fw_ok), .dout(fi_dsm));

  therm_dec #(.W(DCO_F_W)) u_fth (.bin(fi_dsm), .therm(fine_th));
  fine_code_sync #(.W((1<<DCO_F_W)-1)) u_sync (.vg(clk_vg), .rst_n, .code_in(fine_th), .code_out(dco_fine));

  // ---------------- frequency-lock path ----------------
  fll_ctrl #(.C_W(DCO_C_W), .M_W(DCO_M_W), .CNT_W(N_W)) u_fll (
    .clk(clk_ref), .rst_n, .en(fll_en), .n_sel, .dco_cnt,
    .coarse(dco_coarse), .med_code(med_bin), .locked(fll_locked));
  therm_dec #(.W(DCO_M_W)) u_mth (.bin(med_bin), .therm(dco_medium));
endmodule
