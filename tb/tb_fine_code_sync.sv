// tb_fine_code_sync: the fine varactor code may only change on the falling
// edge of V_G. The code input changes at random times; the output must be
// constant while V_G is high or low and equal the input at the last V_G
// falling edge.
`timescale 1ns/1ps
module tb_fine_code_sync;
  logic vg = 0, rst_n = 0;
  logic [30:0] code_in = 0, code_out, at_fall, prev;
  int checks = 0, failures = 0;
  fine_code_sync dut (.vg, .rst_n, .code_in, .code_out);
  always #0.55 vg = ~vg;   // ~900 MHz
  initial forever begin
    #($urandom_range(100, 3000) * 1ps);
    code_in = 31'((64'(1) << $urandom_range(0, 31)) - 1);
  end
  always @(negedge vg) at_fall = code_in;
  initial begin
    #5 rst_n = 1;
    repeat (3000) begin
      @(posedge vg); prev = code_out;
      #0.5;
      checks++;
      if (code_out !== prev) begin failures++; $display("FAIL: changed while V_G high"); end
      @(negedge vg); #0.3;
      checks++;
      if (code_out !== at_fall) begin failures++; $display("FAIL: not the code at the V_G fall"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100us; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
