// db_encoder: differential duobinary encoder.
// From the precoded bit pc and its value one bit period earlier (pc_d):
//   Duo_P = pc & ~pc_d,   Duo_N = ~pc & pc_d
// Duo_P - Duo_N = pc - pc_d is the three-level symbol: an NRZ 1 (pc
// toggled) gives +1 or -1, alternating from one 1 to the next, and an NRZ 0
// gives 0. The envelope is thus the input bit, so an envelope detector can
// receive it, and successive 1s cancel so the symbol stream has no DC (no
// LO feed-through). Both outputs are binary, updated on pc_valid and held
// for the bit period (two over-sampling clocks).
// The thesis gives the encoder as 1 + z^-1 and also tabulates NRZ 1 ->
// +-1, NRZ 0 -> 0; this design follows the table, which with the 1/(1+z^-1)
// precoder corresponds to the difference form above.
module db_encoder (
  input  logic clk2x,
  input  logic rst_n,
  input  logic pc,
  input  logic pc_valid,
  output logic duo_p,
  output logic duo_n
);
  logic pc_d;

  always_ff @(posedge clk2x or negedge rst_n) begin
    if (!rst_n) begin
      pc_d <= 1'b0; duo_p <= 1'b0; duo_n <= 1'b0;
    end else if (pc_valid) begin
      pc_d  <= pc;
      duo_p <= pc & ~pc_d;
      duo_n <= ~pc & pc_d;
    end
  end
endmodule
