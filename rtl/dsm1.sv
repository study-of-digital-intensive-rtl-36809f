// dsm1: first-order error-feedback delta-sigma requantiser.
// Each enabled clock the IN_W-bit input plus the fractional error kept from
// the previous cycle is truncated to its OUT_W most significant bits; the
// dropped bits are fed back. The output's average equals the input's value
// scaled by 2^-(IN_W-OUT_W), and saturates at the top code. Registered
// output, one cycle latency. Used after the LMS gain accumulators (16 -> 10
// bits, as in the calibration diagram) and after the loop filter for the DCO
// fine stage, where it runs on a divided DCO clock.
module dsm1 #(
  parameter int unsigned IN_W  = 16,
  parameter int unsigned OUT_W = 10
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [IN_W-1:0]  din,
  output logic [OUT_W-1:0] dout
);
  localparam int unsigned FW = IN_W - OUT_W;
  logic [FW-1:0] err;
  logic [IN_W:0] sum;

  assign sum = (IN_W+1)'(din) + (IN_W+1)'(err);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      err  <= '0;
      dout <= '0;
    end else if (en) begin
      if (sum[IN_W]) begin
        dout <= '1;
        err  <= '0;
      end else begin
        dout <= sum[IN_W-1:FW];
        err  <= sum[FW-1:0];
      end
    end
  end
endmodule
