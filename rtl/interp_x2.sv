// interp_x2: one x2 interpolation stage of the TX baseband.
// On an input strobe the new sample is captured and the stage emits the
// sample it held until then; on the output strobe half-way between input
// strobes it emits the mid-point of that sample and the new one, i.e. a [1 2 1]/2
// half-band after zero stuffing. With GAIN2 = 1 the two values are not
// halved, so the stage gains x2 and its output is one bit wider than its
// input; with GAIN2 = 0 the gain is unity. Latency: one input period.
// The x2 structure follows the "2-2-2" interpolator chain; the [1 2 1]
// kernel is this design's choice.
module interp_x2 #(
  parameter int unsigned IN_W  = 10,
  parameter int unsigned OUT_W = 11,
  parameter bit          GAIN2 = 1'b1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_en,
  input  logic                    out_en,
  input  logic signed [IN_W-1:0]  din,
  output logic signed [OUT_W-1:0] dout
);
  logic signed [IN_W-1:0] cur, prv;
  logic signed [IN_W:0]   sum;

  assign sum = (IN_W+1)'(cur) + (IN_W+1)'(prv);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur <= '0; prv <= '0; dout <= '0;
    end else begin
      if (in_en) begin
        prv <= cur;
        cur <= din;
      end
      if (out_en) begin
        if (in_en)
          dout <= GAIN2 ? OUT_W'(2 * (IN_W+1)'(cur)) : OUT_W'(cur);
        else
          dout <= GAIN2 ? OUT_W'(sum) : OUT_W'(sum >>> 1);
      end
    end
  end
endmodule
