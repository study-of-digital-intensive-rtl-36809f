// tx_dbb: multi-rate TX digital baseband for direct frequency modulation.
// Everything runs on the 40 MHz reference clock CKR with clock enables:
// CKR/8 gives the 5 MHz Gaussian-filter rate and that /10 gives the
// 0.5 MHz symbol rate. Chain: gmsk_mod (8 b) -> gauss_filter (10 b, BT 0.5)
// -> interp_filter (12 b, 2-2-2 to 40 MHz) -> K_MOD gain (8 b). The 8-bit
// signed output is the frequency offset that is added to the PLL frequency
// control word in TX mode; kmod scales the deviation (out = x*kmod/4096).
// With tx_en low the dividers hold in reset and the output is 0.
// The rates, widths and block order follow the TX baseband diagram; the
// gain scaling and the enable are this design's choices.
module tx_dbb (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              tx_en,
  input  logic              tx_clk,
  input  logic              tx_data,
  input  logic [7:0]        kmod,
  output logic signed [7:0] fcw_mod,
  output logic              sym_en
);
  logic [2:0] div8;
  logic [3:0] div10;
  logic       en5;
  logic signed [7:0]  sym;
  logic signed [9:0]  gsh;
  logic signed [11:0] itp;
  logic signed [20:0] prod;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div8 <= '0; div10 <= '0;
    end else if (!tx_en) begin
      div8 <= '0; div10 <= '0;
    end else begin
      div8 <= div8 + 3'd1;
      if (div8 == 3'd7) div10 <= (div10 == 4'd9) ? 4'd0 : div10 + 4'd1;
    end
  end
  assign en5    = tx_en && (div8 == 3'd7);
  assign sym_en = en5 && (div10 == 4'd9);

  gmsk_mod     u_mod (.clk, .rst_n, .sym_en, .tx_clk, .tx_data, .sym);
  gauss_filter u_gf  (.clk, .rst_n, .in_en(en5), .din(sym), .dout(gsh));
  interp_filter #(.IN_W(10), .OUT_W(12)) u_itp (.clk, .rst_n, .en5, .din(gsh), .dout(itp));

  assign prod = 21'(itp) * $signed({1'b0, kmod});
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      fcw_mod <= '0;
    else if (!tx_en) fcw_mod <= '0;
    else             fcw_mod <= 8'(prod >>> 12);
  end
endmodule
