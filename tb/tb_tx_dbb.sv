// tb_tx_dbb: TX digital baseband from serial bits to the FCW offset.
//  * symbol strobes come exactly every 80 CKR cycles (40 MHz / 80 = 500 kb/s),
//  * during a run of equal bits the offset settles to +-(4*508*kmod)>>12,
//  * the sign of the offset follows the bit, after the filter delay,
//  * with tx_en low the offset is 0.
`timescale 1ns/1ps
module tb_tx_dbb;
  logic clk = 0, rst_n = 0, tx_en = 0, tx_clk = 0, tx_data = 0;
  logic [7:0] kmod = 8'd200;
  logic signed [7:0] fcw_mod;
  logic sym_en;
  int checks = 0, failures = 0, last_se = -1, cyc = 0;
  int bits [$];

  tx_dbb dut (.clk, .rst_n, .tx_en, .tx_clk, .tx_data, .kmod, .fcw_mod, .sym_en);
  always #12.5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (fcw_mod=%0d)", msg, fcw_mod); end
  endtask

  // symbol-rate check
  always @(posedge clk) if (sym_en) begin
    if (last_se >= 0) chk(cyc - last_se == 80, "symbol period 80 cycles");
    last_se <= cyc;
  end

  // serial source, 2 us per bit, data taken from the queue
  task automatic send(input bit b);
    #1000 tx_clk = 1'b0; tx_data = b;
    #1000 tx_clk = 1'b1;
  endtask

  localparam int FULL = (4 * 508 * 200) >>> 12;    //  99
  localparam int NEG  = (-4 * 508 * 200) >>> 12;   // -100 (floor)

  initial begin
    #100 rst_n = 1;
    #100 chk(fcw_mod == 0, "idle offset 0");
    tx_en = 1;
    fork
      begin
        repeat (8) send(1);
        repeat (8) send(0);
        for (int k = 0; k < 40; k++) send(1'($urandom));
        repeat (8) send(1);
      end
      begin
        #14us chk(fcw_mod == FULL, "run of ones: +full deviation");
        #16us chk(fcw_mod == NEG, "run of zeros: -full deviation");
      end
    join
    #2us chk(fcw_mod == FULL, "final ones");
    tx_en = 0;
    #200ns chk(fcw_mod == 0, "tx off gives 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
