// therm_dec: binary-to-thermometer decoder for a bank of unit varactors.
// Output bit i is 1 when the code is greater than i, so a W-bit code turns
// on exactly 'code' of the 2^W - 1 units (a 5-bit code gives the 31 unit
// controls Din_dec[30:0] of the thesis' DCO example). Unit elements keep
// the tuning monotonic. Purely combinational.
module therm_dec #(
  parameter int unsigned W = 5
) (
  input  logic [W-1:0]          bin,
  output logic [(1<<W)-2:0]     therm
);
  always_comb
    for (int i = 0; i < (1 << W) - 1; i++) therm[i] = (32'(bin) > i);
endmodule
