// ilpll_model: discrete-time stand-in for the timing circuits of the
// injection-locked PLL (ring DCO, two-stage DTC, reference doubler,
// injection MUX and sub-sampling BBPD), used only by testbenches.
// Once per reference cycle it
//  * computes the DCO period from its codes:
//      T = T0 + coarse*KC + (#medium units)*KM + (#fine units)*KF   [ps]
//  * counts DCO cycles in the reference period (with a carried fraction),
//  * forms the timing error seen by the BBPD between the injected edge
//      x = DTC(coarse, fine) - phase*T_target - OFFS + duty error (odd edges)
//    and the free-running DCO edge  y = theta + n_sel*(T - T_target),
//    e = x - y (+ jitter), where the coarse DTC has a random per-code error
//    of up to +-INL_PS; theta is the DCO phase w.r.t. the ideal grid,
//  * pulls the DCO towards the injected edge: theta = y + BETA*e
//    (injection strength BETA),
//  * returns the BBPD decision (+1: injected edge late) one cycle later.
// The fractional phase is the one the controller applied: the model keeps
// its own copy of the FCW accumulation, delayed to match the controller.
module ilpll_model #(
  parameter real T_REF   = 25000.0,  // 40 MHz reference
  parameter real FCW     = 23.05,
  parameter real T0      = 900.0,
  parameter real KC      = 30.0,
  parameter real KM      = 1.0,
  parameter real KF      = 0.1,
  parameter real TC      = 28.6,     // coarse DTC LSB
  parameter real TF      = 0.24,     // fine DTC LSB
  parameter real INL_PS  = 15.0,
  parameter real DUTY_PS = 0.0,
  parameter real JIT_PS  = 0.3,
  parameter real BETA    = 0.3,
  parameter int  SEED    = 1
) (
  input  logic              clk_ref,
  input  logic              frac_en,
  input  logic [2:0]        dco_coarse,
  input  logic [30:0]       dco_medium,
  input  logic [30:0]       dco_fine,
  input  logic [5:0]        dtc_coarse,
  input  logic [7:0]        dtc_fine,
  input  logic              edge_odd,
  input  logic [7:0]        n_sel,
  input  real               phase_frac,   // phase the DTC codes were made for
  output logic signed [1:0] bbpd,
  output logic [7:0]        dco_cnt,
  output real               err_ps,
  output real               t_dco
);
  real inl [64];
  real acc_cyc;
  real t_target;
  real theta;
  int  seed;

  // explicit LCG so the sequence depends only on SEED
  function automatic real urand();
    seed = seed * 1103515245 + 12345;
    return real'((seed >>> 8) & 32'hFFFF) / 65536.0;
  endfunction

  initial begin
    seed = SEED;
    for (int i = 0; i < 64; i++) inl[i] = (2.0 * urand() - 1.0) * INL_PS;
    acc_cyc = 0.0;
    theta = 0.0;
    t_target = T_REF / FCW;
    bbpd = 2'sd0;
    dco_cnt = 8'd0;
    err_ps = 0.0;
    t_dco = T0;
  end

  always @(posedge clk_ref) begin
    real t, cyc, e, jit, x, y;
    t = T0 + real'(dco_coarse) * KC + real'($countones(dco_medium)) * KM
           + real'($countones(dco_fine)) * KF;
    t_dco <= t;
    cyc = acc_cyc + T_REF / t;
    dco_cnt <= 8'($rtoi(cyc));
    acc_cyc = cyc - real'($rtoi(cyc));
    jit = (urand() + urand() + urand() + urand() - 2.0) * JIT_PS * 1.7;
    x = real'(dtc_coarse) * TC + inl[dtc_coarse] + real'(dtc_fine) * TF
        - (frac_en ? phase_frac * t_target : 0.0) - 60.0 + (edge_odd ? DUTY_PS : 0.0);
    y = theta + real'(n_sel) * (t - t_target);
    e = x - y;
    theta = y + BETA * e;
    err_ps <= e;
    bbpd <= (e + jit > 0.0) ? 2'sd1 : -2'sd1;
  end
endmodule
