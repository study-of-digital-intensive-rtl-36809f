// tb_tanc_lut: closed-loop test of the per-coarse-code nonlinearity
// correction. Each coarse code c has an unknown delay error err[c] (fine
// units, +-40). The code is read, its correction and the code are
// registered together (as the DTC code registers do), the stand-in BBPD
// judges err[c] + corr + noise one cycle later. After training every
// entry must be within 2 units of -err[c]; clr empties the table.
`timescale 1ns/1ps
module tb_tanc_lut;
  import trx_pkg::*;
  logic clk = 0, rst_n = 0, en = 1, clr = 0;
  logic [5:0] coarse_rd = 0, coarse_q = 0;
  bbpd_t bbpd = BB_NONE;
  logic signed [7:0] corr, corr_q = 0;
  int checks = 0, failures = 0, bad = 0;
  int err [64];

  tanc_lut dut (.clk, .rst_n, .en, .clr, .coarse_rd, .coarse_obs(coarse_q), .bbpd, .corr);
  always #5 clk = ~clk;

  always @(posedge clk) begin
    real e;
    e = real'(err[coarse_q]) + real'(corr_q) + (real'($urandom_range(0, 1000)) - 500.0) / 500.0;
    bbpd     <= (e > 0.0) ? BB_LATE : BB_EARLY;
    coarse_q <= coarse_rd;
    corr_q   <= corr;
    coarse_rd <= 6'($urandom);
  end

  initial begin
    foreach (err[i]) err[i] = int'($urandom_range(0, 80)) - 40;
    #12 rst_n = 1;
    repeat (300000) @(posedge clk);
    for (int c = 0; c < 64; c++) begin
      int v;
      v = int'(dut.lut[c] >>> 6);
      checks++;
      if (v + err[c] > 2 || v + err[c] < -2) begin
        failures++; $display("FAIL: code %0d entry %0d error %0d", c, v, err[c]);
      end
    end
    @(negedge clk) clr = 1; @(negedge clk) clr = 0;
    for (int c = 0; c < 64; c++) if (dut.lut[c] != 0) bad++;
    checks++;
    if (bad != 0) begin failures++; $display("FAIL: clr left %0d entries", bad); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
