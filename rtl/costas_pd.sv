// costas_pd: sign-Costas phase detector of the carrier-recovery loop.
//   e = sign(I) * Q - sign(Q) * I
// The four-quadrant form suits MSK/GMSK, whose phase sits on one of four
// axes at symbol instants. e is zero when a sample lies on a diagonal
// (|I| = |Q|) and its sign gives the direction of the residual rotation, so
// the loop parks the symbol points on the diagonals; averaged over many
// symbols this removes the carrier frequency offset. Combinational. The
// thesis names a sign-Costas detector; the four-quadrant form is this
// design's choice.
module costas_pd #(
  parameter int unsigned W = 14
) (
  input  logic signed [W-1:0] i_in,
  input  logic signed [W-1:0] q_in,
  output logic signed [W:0]   err
);
  logic signed [W:0] a, b;
  assign a = i_in[W-1] ? -(W+1)'(q_in) : (W+1)'(q_in);
  assign b = q_in[W-1] ? -(W+1)'(i_in) : (W+1)'(i_in);
  assign err = a - b;
endmodule
