// int_dump: integrate-and-dump decimator, 8 MS/s -> 1 MS/s.
// Sums DEC consecutive input samples (one per en strobe) and, on the last
// of them, dumps the sum to the output and raises 'valid' for one cycle;
// the sum then restarts. It low-pass filters the phase error and lowers the
// rate of the carrier-loop filter. Output width grows by log2(DEC).
// The function and the 8:1 ratio are the thesis'.
module int_dump #(
  parameter int unsigned W   = 15,
  parameter int unsigned DEC = 8
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          en,
  input  logic signed [W-1:0]           din,
  output logic signed [W+$clog2(DEC)-1:0] dout,
  output logic                          valid
);
  localparam int unsigned OW = W + $clog2(DEC);
  logic signed [OW-1:0] acc;
  logic [$clog2(DEC)-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0; cnt <= '0; dout <= '0; valid <= 1'b0;
    end else begin
      valid <= 1'b0;
      if (en) begin
        if (cnt == $clog2(DEC)'(DEC-1)) begin
          dout  <= acc + OW'(din);
          valid <= 1'b1;
          acc   <= '0;
          cnt   <= '0;
        end else begin
          acc <= acc + OW'(din);
          cnt <= cnt + 1'b1;
        end
      end
    end
  end
endmodule
