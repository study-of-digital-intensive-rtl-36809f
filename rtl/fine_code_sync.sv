// fine_code_sync: self-clocked non-overlap update of the DCO fine varactors.
// A NAND3 varactor's capacitance depends on the voltage of its gate node
// V_G as well as on its control bit, so a control bit that changes while
// V_G is high makes a capacitance step and a reference spur. Here the
// thermometer control word is re-timed by the varactor stage's own V_G:
// the register loads on the falling edge of V_G, so every control bit
// changes right after V_G has gone low, whatever the coarse-stage delay
// and PVT corner. The thesis gives the rule "the fine-stage control code
// is locally synchronized to its output V_G" and the update at V_G = 0;
// re-timing on the falling edge is this design's reading of it.
// The input must be stable for one V_G period (it changes at the reference
// or divided-DCO rate, far slower). Asynchronous active-low reset.
module fine_code_sync #(
  parameter int unsigned W = 31
) (
  input  logic         vg,
  input  logic         rst_n,
  input  logic [W-1:0] code_in,
  output logic [W-1:0] code_out
);
  always_ff @(negedge vg or negedge rst_n) begin
    if (!rst_n) code_out <= '0;
    else        code_out <= code_in;
  end
endmodule
