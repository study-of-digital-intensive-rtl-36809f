// duobinary_mod: pulse-shaped differential duobinary baseband modulator for
// a spectrum-mask-compliant 60 GHz ASK transmitter.
// NRZ data -> db_precoder (x2 up-sampler + mod-2 counter) -> db_encoder
// (Duo_P / Duo_N) -> semi_digital_fir (two binary FIRs whose weighted
// currents are summed). Everything runs on one clock at twice the bit rate.
// The output iout is the differential filter current in unit-current
// steps; it has three levels before shaping, zero DC, and the raised-cosine
// spectrum, and its envelope equals the NRZ data, so the receiver can be a
// plain envelope detector. Latency from an input bit to the start of its
// shaped pulse: about 4 clocks.
module duobinary_mod (
  input  logic              clk2x,
  input  logic              rst_n,
  input  logic              nrz_in,
  output logic              duo_p,
  output logic              duo_n,
  output logic signed [7:0] iout
);
  logic pc, pc_valid;
  db_precoder      u_pre (.clk2x, .rst_n, .nrz_in, .pc, .pc_valid);
  db_encoder       u_enc (.clk2x, .rst_n, .pc, .pc_valid, .duo_p, .duo_n);
  semi_digital_fir u_fir (.clk2x, .rst_n, .duo_p, .duo_n, .iout);
endmodule
