// db_precoder: over-sampling precoder of the differential duobinary coder.
// It runs on the x2 over-sampling clock (twice the bit rate), the same clock
// as the pulse-shaping filter. The NRZ input is re-sampled on every clock
// (the x2 up-sampler) and a phase bit marks the first half of each bit
// period. In that half a 1 bit makes the modulus-2 counter toggle, so the
// output is the running parity pc[k] = pc[k-1] XOR d[k], the mod-2 form of
// 1 / (1 + z^-1). pc changes once per bit period and pc_valid pulses in the
// cycle after it has changed. Because each bit period always has a clock
// edge inside it, the input needs no alignment to the clock beyond the
// flop's own setup time. Up-sampler plus mod-2 counter are the thesis';
// the choice of the first half-period as sampling point is this design's.
module db_precoder (
  input  logic clk2x,
  input  logic rst_n,
  input  logic nrz_in,
  output logic pc,
  output logic pc_valid
);
  logic s, ph;

  always_ff @(posedge clk2x or negedge rst_n) begin
    if (!rst_n) begin
      s <= 1'b0; ph <= 1'b0; pc <= 1'b0; pc_valid <= 1'b0;
    end else begin
      s        <= nrz_in;       // x2 up-sampler
      ph       <= ~ph;
      pc_valid <= ph;
      if (ph && s) pc <= ~pc;   // modulus-2 counter
    end
  end
endmodule
