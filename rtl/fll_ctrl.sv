// fll_ctrl: counter-based frequency-lock path of the IL-PLL.
// Each reference cycle the number of DCO cycles counted in that period
// (dco_cnt, from the DCO-clocked counter) is compared with the number the
// FCW asks for (n_sel = N or N+1). The differences are summed over a window
// of 2^WIN_LOG2 reference cycles. At the end of a window an excess beyond
// +-TOL means the DCO is fast: the medium code steps up (more capacitance,
// lower frequency), a deficit steps it down. When the medium code is at an
// end, the coarse (path-selection) code steps instead and the medium code
// returns to mid-scale. 'locked' is set after LOCK_WIN consecutive windows
// within tolerance; from then on the codes are frozen and the phase-lock
// path alone tracks the DCO. Lowering en stops the FLL; raising it again
// restarts acquisition from the present codes. Codes change only at window
// ends. The counter-based path steering coarse and med_code stages follows
// the architecture description; the window, tolerance and stepping rule are
// this design's choices.
module fll_ctrl #(
  parameter int unsigned C_W      = 3,
  parameter int unsigned M_W      = 5,
  parameter int unsigned CNT_W    = 8,
  parameter int unsigned WIN_LOG2 = 7,
  parameter int unsigned TOL      = 2,
  parameter int unsigned LOCK_WIN = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [CNT_W-1:0] n_sel,
  input  logic [CNT_W-1:0] dco_cnt,
  output logic [C_W-1:0]   coarse,
  output logic [M_W-1:0]   med_code,
  output logic             locked
);
  localparam int unsigned EW = CNT_W + WIN_LOG2 + 2;
  localparam logic [M_W-1:0] M_MID = M_W'(1 << (M_W-1));

  logic [WIN_LOG2-1:0] tick;
  logic signed [EW-1:0] err, err_nxt;
  logic [$clog2(LOCK_WIN+1)-1:0] good;

  localparam logic signed [EW-1:0] TOL_P = EW'(TOL);
  localparam logic signed [EW-1:0] TOL_N = -EW'(TOL);
  assign err_nxt = err + EW'($signed({1'b0, dco_cnt})) - EW'($signed({1'b0, n_sel}));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tick <= '0; err <= '0; good <= '0; locked <= 1'b0;
      coarse <= C_W'(1 << (C_W-1));
      med_code <= M_MID;
    end else if (!en) begin
      tick <= '0; err <= '0; good <= '0; locked <= 1'b0;
    end else if (!locked) begin
      tick <= tick + 1'b1;
      if (tick == '1) begin
        err <= '0;
        if (err_nxt > TOL_P) begin
          good <= '0; locked <= 1'b0;
          if (med_code != '1)     med_code <= med_code + 1'b1;
          else if (coarse != '1) begin coarse <= coarse + 1'b1; med_code <= M_MID; end
        end else if (err_nxt < TOL_N) begin
          good <= '0; locked <= 1'b0;
          if (med_code != '0)     med_code <= med_code - 1'b1;
          else if (coarse != '0) begin coarse <= coarse - 1'b1; med_code <= M_MID; end
        end else begin
          if (32'(good) < LOCK_WIN) good <= good + 1'b1;
          if (32'(good) + 1 >= LOCK_WIN) locked <= 1'b1;
        end
      end else begin
        err <= err_nxt;
      end
    end
  end
endmodule
