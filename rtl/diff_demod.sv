// diff_demod: one-bit difference demodulator for GMSK.
// For each new symbol sample z_k = I_k + jQ_k the sign of
//   Im(z_k conj z_{k-1}) = Q_k I_{k-1} - I_k Q_{k-1}
// is taken: the bit is 1 when the phase advanced over the symbol (positive
// frequency deviation) and 0 otherwise. Only this one sign bit leaves the
// block. The product is formed at full precision, so the decision does not
// depend on the absolute carrier phase, only on the phase step. Output bit
// and valid are registered one cycle after the input valid. The one-bit
// difference demodulator after the decimation is the thesis'; the
// detection rule is this design's reading of it.
module diff_demod #(
  parameter int unsigned W = 14
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] i_in,
  input  logic signed [W-1:0] q_in,
  output logic                bit_out,
  output logic                bit_valid
);
  logic signed [W-1:0]   i1, q1;      // previous symbol sample
  logic signed [2*W:0]   d;

  assign d = (2*W+1)'(q_in) * (2*W+1)'(i1) - (2*W+1)'(i_in) * (2*W+1)'(q1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i1 <= '0; q1 <= '0; bit_out <= 1'b0; bit_valid <= 1'b0;
    end else begin
      bit_valid <= in_valid;
      if (in_valid) begin
        i1      <= i_in;
        q1      <= q_in;
        bit_out <= (d > 0);
      end
    end
  end
endmodule
