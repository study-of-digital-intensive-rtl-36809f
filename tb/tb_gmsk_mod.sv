// tb_gmsk_mod: drives an asynchronous 500 kb/s serial bit stream (TX_CLK,
// TX_DATA) into the symbol mapper and checks that every symbol strobe
// outputs +SYM_AMP for a 1 and -SYM_AMP for a 0 of the bit most recently
// clocked in.
`timescale 1ns/1ps
module tb_gmsk_mod;
  logic clk = 0, rst_n = 0, sym_en = 0, tx_clk = 0, tx_data = 0;
  logic signed [7:0] sym;
  int checks = 0, failures = 0;
  bit last_bit;

  gmsk_mod dut (.clk, .rst_n, .sym_en, .tx_clk, .tx_data, .sym);
  always #12.5 clk = ~clk;     // 40 MHz

  // bit source: data changes on the falling edge of tx_clk (period 2 us)
  initial begin
    #333;
    forever begin
      #1000 tx_clk = 1'b0; tx_data = 1'($urandom);
      #1000 tx_clk = 1'b1; last_bit = tx_data;
    end
  end

  // symbol strobe in the middle of each tx_clk high phase
  initial begin
    #100 rst_n = 1;
    repeat (300) begin
      @(posedge tx_clk);
      #500; @(posedge clk); sym_en <= 1'b1;
      @(posedge clk); sym_en <= 1'b0;
      @(posedge clk); #1;
      checks++;
      if (sym !== (last_bit ? 8'sd127 : -8'sd127)) begin
        failures++; $display("FAIL: bit %0d gave symbol %0d", last_bit, sym);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
