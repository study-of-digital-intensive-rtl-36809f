// tb_mm_timing_rec: two instances of the timing recovery, fed by complex
// GMSK baseband at 8 MS/s whose symbol rate is 2000 ppm fast (instance A)
// and 2000 ppm slow (instance B). Over 40000 samples (2500 symbols) the
// transmitter clock slips 80 samples, so:
//  * A must take mostly short periods (advances), B mostly long ones
//    (retards), each net count within 50..110;
//  * every strobe interval must be SPS-1, SPS or SPS+1 samples, and the
//    output sample must be the input sample of the strobe cycle.
`timescale 1ns/1ps
module tb_mm_timing_rec;
  logic clk = 0, rst_n = 0, en = 0;
  logic signed [13:0] ia, qa, ib, qb, sia, sqa, sib, sqb;
  logic va, vb, adv_a, ret_a, adv_b, ret_b;
  logic signed [9:0] unused_a, unused_b;
  real bia, bqa, bib, bqb;
  int checks = 0, failures = 0, na_adv = 0, na_ret = 0, nb_adv = 0, nb_ret = 0, gap = 0;

  always #62.5 clk = ~clk;
  gmsk_if_gen #(.PPM(2000.0),  .NOISE(0.0), .SEED(3)) gen_a (.clk, .en, .if_data(unused_a), .bb_i(bia), .bb_q(bqa));
  gmsk_if_gen #(.PPM(-2000.0), .NOISE(0.0), .SEED(5)) gen_b (.clk, .en, .if_data(unused_b), .bb_i(bib), .bb_q(bqb));
  assign ia = 14'($rtoi(bia * 8.0));
  assign qa = 14'($rtoi(bqa * 8.0));
  assign ib = 14'($rtoi(bib * 8.0));
  assign qb = 14'($rtoi(bqb * 8.0));

  mm_timing_rec dut_a (.clk, .rst_n, .en, .i_in(ia), .q_in(qa), .i_s(sia), .q_s(sqa), .valid(va), .adv(adv_a), .ret(ret_a));
  mm_timing_rec dut_b (.clk, .rst_n, .en, .i_in(ib), .q_in(qb), .i_s(sib), .q_s(sqb), .valid(vb), .adv(adv_b), .ret(ret_b));

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic signed [13:0] ia_d;
  int first = 1;
  always @(posedge clk) if (rst_n) begin
    ia_d <= ia;
    if (adv_a) na_adv++;
    if (ret_a) na_ret++;
    if (adv_b) nb_adv++;
    if (ret_b) nb_ret++;
    gap <= va ? 1 : gap + 1;
    if (va) begin
      if (!first) chk(gap >= 15 && gap <= 17, "strobe interval SPS-1..SPS+1");
      chk(sia == ia_d, "strobe passes the current sample");
      first = 0;
    end
  end

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1; en = 1;
    repeat (40000) @(posedge clk);
    $display("fast symbols: adv %0d ret %0d; slow symbols: adv %0d ret %0d", na_adv, na_ret, nb_adv, nb_ret);
    chk(na_adv - na_ret >= 50 && na_adv - na_ret <= 110, "fast symbols advance the sampling");
    chk(nb_ret - nb_adv >= 50 && nb_ret - nb_adv <= 110, "slow symbols retard the sampling");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
