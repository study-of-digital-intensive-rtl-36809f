// tb_costas_pd: the sign-Costas detector must give sgn(I)Q - sgn(Q)I for
// random inputs, zero on the four lock points (+-a, +-a), and a sign that
// pulls a slightly rotated point back towards the nearest lock point.
module tb_costas_pd;
  logic signed [13:0] i_in, q_in;
  logic signed [14:0] err;
  int checks = 0, failures = 0;
  costas_pd dut (.i_in, .q_in, .err);
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s I=%0d Q=%0d err=%0d", msg, i_in, q_in, err); end
  endtask
  initial begin
    int r, si, sq;
    for (int k = 0; k < 2000; k++) begin
      i_in = 14'($urandom); q_in = 14'($urandom); #1;
      si = (i_in < 0) ? -1 : 1; sq = (q_in < 0) ? -1 : 1;
      r = si * int'(q_in) - sq * int'(i_in);
      chk(int'(err) == r, "reference");
    end
    for (int a = 100; a < 4000; a += 700) begin
      i_in = 14'(a);  q_in = 14'(a);  #1 chk(err == 0, "lock point 1");
      i_in = 14'(-a); q_in = 14'(a);  #1 chk(err == 0, "lock point 2");
      // rotated counter-clockwise from 45 degrees: error positive
      i_in = 14'(a);  q_in = 14'(a + a / 8); #1 chk(err > 0, "ccw rotation sign");
      i_in = 14'(a + a / 8); q_in = 14'(a);  #1 chk(err < 0, "cw rotation sign");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
