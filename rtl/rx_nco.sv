// rx_nco: quadrature local oscillator of the digital down-conversion.
// A 16-bit phase accumulator advances by fcw + freq_adj every en strobe
// (fcw = 8192 gives the 1 MHz IF at 8 MS/s; freq_adj is the carrier-loop
// correction). The top 6 phase bits address a 64-point sine/cosine,
// obtained from a 17-entry quarter-wave table of round(127 sin(k pi/32)),
// k = 0..16, by symmetry. Outputs are 8-bit signed, registered (one cycle
// latency). The thesis states that the quadrature LO is recovered by the
// carrier-recovery loop; the NCO form and sizes are this design's choices.
module rx_nco #(
  parameter int unsigned PH_W = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  logic [PH_W-1:0]        fcw,
  input  logic signed [PH_W-1:0] freq_adj,
  output logic signed [7:0]      lo_cos,
  output logic signed [7:0]      lo_sin
);
  localparam logic [6:0] QSIN [17] = '{7'd0, 7'd12, 7'd25, 7'd37, 7'd49, 7'd60, 7'd71, 7'd81,
                                       7'd90, 7'd98, 7'd106, 7'd112, 7'd117, 7'd122, 7'd125,
                                       7'd126, 7'd127};
  logic [PH_W-1:0] ph;
  logic [5:0]      idx_s, idx_c;

  function automatic logic signed [7:0] sin64(input logic [5:0] k);
    logic [4:0] q;
    logic [6:0] m;
    q = {1'b0, k[3:0]};
    m = k[4] ? QSIN[5'd16 - q] : QSIN[q];
    return k[5] ? -$signed({1'b0, m}) : $signed({1'b0, m});
  endfunction

  assign idx_s = ph[PH_W-1 -: 6];
  assign idx_c = idx_s + 6'd16;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph <= '0; lo_cos <= '0; lo_sin <= '0;
    end else if (en) begin
      ph     <= ph + fcw + freq_adj;
      lo_sin <= sin64(idx_s);
      lo_cos <= sin64(idx_c);
    end
  end
endmodule
