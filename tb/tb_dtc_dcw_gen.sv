// tb_dtc_dcw_gen: random phase, gain and correction words held for three
// cycles; the registered DCW, coarse code, fine pre-code and fine code
// must equal a reference computation (with its clamps), including the
// extremes of every input.
`timescale 1ns/1ps
module tb_dtc_dcw_gen;
  logic clk = 0, rst_n = 0;
  logic [15:0] phase = 0;
  logic [9:0] gc = 0, gf = 0;
  logic signed [7:0] tanc = 0, dcc = 0;
  logic [13:0] dcw;
  logic [5:0] coarse;
  logic [8:0] fine_pre;
  logic [7:0] fine;
  int checks = 0, failures = 0;

  dtc_dcw_gen dut (.clk, .rst_n, .phase, .gc, .gf, .tanc, .dcc, .dcw, .coarse, .fine_pre, .fine);
  always #5 clk = ~clk;

  initial begin
    longint d, fp, f;
    #12 rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      phase = (k < 4) ? 16'hFFFF : 16'($urandom);
      gc    = (k < 2) ? 10'h3FF : 10'($urandom);
      gf    = (k % 7 == 0) ? 10'h3FF : 10'($urandom);
      tanc  = (k % 5 == 0) ? 8'sh80 : (k % 5 == 1) ? 8'sh7F : 8'($urandom);
      dcc   = (k % 3 == 0) ? 8'sh7F : 8'($urandom);
      repeat (3) @(negedge clk);
      d = (longint'(phase) * longint'(gc)) >> 12;
      if (d > 16383) d = 16383;
      fp = (d & 255) + longint'(tanc) + longint'(dcc) + 128;
      if (fp < 0) fp = 0;
      if (fp > 511) fp = 511;
      f = (fp * longint'(gf)) >> 10;
      if (f > 255) f = 255;
      checks++;
      if (dcw != 14'(d) || coarse != 6'(d >> 8) || fine_pre != 9'(fp) || fine != 8'(f)) begin
        failures++;
        $display("FAIL: ph=%0d gc=%0d gf=%0d tanc=%0d dcc=%0d -> %0d %0d %0d %0d exp %0d %0d %0d %0d",
                 phase, gc, gf, tanc, dcc, dcw, coarse, fine_pre, fine, d, d >> 8, fp, f);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
