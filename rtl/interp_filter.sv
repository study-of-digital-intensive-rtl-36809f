// interp_filter: the "2-2-2" Nyquist interpolation chain of the TX baseband.
// Three interp_x2 stages take the 5 MHz Gaussian-filter output to 10, 20
// and 40 MHz (the CKR rate). The first two stages gain x2 (10 -> 11 -> 12
// bits) and the last has unity gain, so the 12-bit output is 4x the input
// scale. Strobes: en5 (5 MHz), and the 10 and 20 MHz strobes are derived
// here from a 2-bit phase counter clocked at 40 MHz that is realigned by
// en5; the last stage updates every CKR cycle. Each stage takes its input
// strobes one CKR cycle after the stage before it has updated, so every
// stage reads a settled sample (en10_d, en20_d, en20_dd). Latency about
// 2 input periods. Rates and widths follow the TX baseband diagram; the kernels are
// this design's choice.
module interp_filter #(
  parameter int unsigned IN_W  = 10,
  parameter int unsigned OUT_W = 12
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en5,
  input  logic signed [IN_W-1:0]  din,
  output logic signed [OUT_W-1:0] dout
);
  logic [1:0] ph;       // 40 MHz cycles since the last 5 MHz strobe (mod 4)
  logic       en10, en20, en10_d, en20_d, en20_dd;
  logic signed [IN_W:0]   s1;
  logic signed [IN_W+1:0] s2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ph <= '0;
    else        ph <= en5 ? 2'd1 : ph + 2'd1;
  end
  assign en20 = en5 || !ph[0];
  assign en10 = en5 || (ph == 2'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      en10_d <= 1'b0; en20_d <= 1'b0; en20_dd <= 1'b0;
    end else begin
      en10_d <= en10; en20_d <= en20; en20_dd <= en20_d;
    end
  end

  interp_x2 #(.IN_W(IN_W),   .OUT_W(IN_W+1), .GAIN2(1'b1)) u_s1
    (.clk, .rst_n, .in_en(en5),  .out_en(en10), .din(din), .dout(s1));
  interp_x2 #(.IN_W(IN_W+1), .OUT_W(IN_W+2), .GAIN2(1'b1)) u_s2
    (.clk, .rst_n, .in_en(en10_d), .out_en(en20_d), .din(s1),  .dout(s2));
  interp_x2 #(.IN_W(IN_W+2), .OUT_W(OUT_W),  .GAIN2(1'b0)) u_s3
    (.clk, .rst_n, .in_en(en20_dd), .out_en(1'b1), .din(s2),  .dout(dout));
endmodule
