// gmsk_if_gen: testbench signal source for the GMSK receiver.
// On every 'en' (8 MS/s) it advances time by one sample and produces
//  * bb_i / bb_q: the complex GMSK baseband (amplitude AMP, h = 0.5,
//    BT = 0.5) for a random bit stream at 500 kb/s x (1 + PPM*1e-6),
//  * if_data: the same signal on an IF of IF_HZ with a DC offset and
//    uniform noise, quantised to the 10-bit ADC range.
// The Gaussian filter is applied to the NRZ frequency pulse by direct
// evaluation of the erf-shaped step response. Every bit sent is pushed
// into 'sent' (oldest first) when its symbol starts, with its start
// sample number.
module gmsk_if_gen #(
  parameter real FS    = 8.0e6,
  parameter real RB    = 500.0e3,
  parameter real IF_HZ = 1.0e6,
  parameter real AMP   = 400.0,
  parameter real DC    = 25.0,
  parameter real NOISE = 20.0,
  parameter real PPM   = 0.0,
  parameter int  SEED  = 7
) (
  input  logic              clk,
  input  logic              en,
  output logic signed [9:0] if_data,
  output real               bb_i,
  output real               bb_q
);
  localparam real PI = 3.14159265358979;
  localparam int  NB = 8;            // bits of Gaussian memory kept
  bit  hist [NB];                    // hist[0] = current bit
  real tsym, phase, ifph;
  int  seed, nbits;
  bit  sent [$];

  function automatic real urand();
    seed = seed * 1103515245 + 12345;
    return real'((seed >>> 8) & 32'hFFFF) / 65536.0;
  endfunction

  // Gaussian-filtered rectangular pulse of one bit (BT = 0.5), t in bits
  // from the bit centre; approximated with a logistic form of erf
  function automatic real gpulse(input real t);
    real s, a, b;
    s = 0.5 * (1.0 / (2.0 * PI * 0.5)) * $sqrt($ln(2.0)) * 2.0;   // sigma in bits
    a = (t + 0.5) / (s * 1.41421356);
    b = (t - 0.5) / (s * 1.41421356);
    return 0.5 * ($tanh(1.2 * a) - $tanh(1.2 * b));
  endfunction

  initial begin
    seed = SEED; tsym = 0.0; phase = 0.0; ifph = 0.0; nbits = 0;
    foreach (hist[i]) hist[i] = 1'b0;
    if_data = '0; bb_i = AMP; bb_q = 0.0;
  end

  always @(posedge clk) if (en) begin
    real f, x;
    // instantaneous frequency in units of the peak deviation (RB/4)
    f = 0.0;
    for (int i = 0; i < NB; i++)
      f += (hist[i] ? 1.0 : -1.0) * gpulse(tsym + real'(i) - real'(NB / 2));
    phase += 2.0 * PI * (RB / 4.0) * f / FS;
    ifph  += 2.0 * PI * IF_HZ / FS;
    if (ifph > 2.0 * PI) ifph -= 2.0 * PI;
    bb_i = AMP * $cos(phase);
    bb_q = AMP * $sin(phase);
    x = AMP * $cos(ifph + phase) + DC + (2.0 * urand() - 1.0) * NOISE;
    if (x > 511.0) x = 511.0;
    if (x < -512.0) x = -512.0;
    if_data <= 10'($rtoi(x));
    tsym += (RB / FS) * (1.0 + PPM * 1.0e-6);
    if (tsym >= 1.0) begin
      tsym -= 1.0;
      for (int i = NB - 1; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = (urand() > 0.5);
      sent.push_back(hist[NB / 2]);   // the bit now at the pulse centre
      nbits++;
    end
  end
endmodule
