// tb_db_encoder: random precoded bits with a valid every second clock.
// Duo_P - Duo_N must equal pc - pc(previous bit), the two outputs are never
// high together, and they hold between valids.
`timescale 1ns/1ps
module tb_db_encoder;
  logic clk2x = 0, rst_n = 0, pc = 0, pc_valid = 0, duo_p, duo_n;
  int checks = 0, failures = 0;
  bit last = 0;
  db_encoder dut (.clk2x, .rst_n, .pc, .pc_valid, .duo_p, .duo_n);
  always #1 clk2x = ~clk2x;
  initial begin
    int ex;
    #3 rst_n = 1;
    repeat (3000) begin
      @(negedge clk2x);
      pc = 1'($urandom); pc_valid = 1;
      ex = int'(pc) - int'(last); last = pc;
      @(negedge clk2x) pc_valid = 0;
      checks++;
      if (int'(duo_p) - int'(duo_n) != ex || (duo_p && duo_n)) begin
        failures++; $display("FAIL: P=%0b N=%0b exp %0d", duo_p, duo_n, ex);
      end
      pc = 1'($urandom);   // ignored without valid
      @(negedge clk2x);
      checks++;
      if (int'(duo_p) - int'(duo_n) != ex) begin failures++; $display("FAIL: not held"); end
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
