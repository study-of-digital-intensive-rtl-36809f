// gmsk_mod: symbol mapper at the head of the TX digital baseband.
// The external bit clock tx_clk is synchronised into the CKR domain and its
// rising edge captures tx_data into a holding register. On every 0.5 MHz
// symbol strobe (sym_en) the held bit is mapped to a signed 8-bit NRZ
// frequency symbol: 1 -> +SYM_AMP, 0 -> -SYM_AMP. Output changes one CKR
// cycle after sym_en and holds until the next strobe.
// The 8-bit width and the 0.5 MHz rate follow the TX baseband diagram; the
// capture scheme and the amplitude are this design's choices.
module gmsk_mod #(
  parameter int signed SYM_AMP = 127
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sym_en,
  input  logic              tx_clk,
  input  logic              tx_data,
  output logic signed [7:0] sym
);
  logic [2:0] clk_sync;
  logic       bit_hold;
  logic       data_s1, data_s2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clk_sync <= '0;
      data_s1  <= 1'b0;
      data_s2  <= 1'b0;
      bit_hold <= 1'b0;
      sym      <= '0;
    end else begin
      clk_sync <= {clk_sync[1:0], tx_clk};
      data_s1  <= tx_data;
      data_s2  <= data_s1;
      if (clk_sync[1] && !clk_sync[2]) bit_hold <= data_s2;
      if (sym_en) sym <= bit_hold ? 8'(SYM_AMP) : 8'(-SYM_AMP);
    end
  end
endmodule
