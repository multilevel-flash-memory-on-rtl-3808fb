// therm_to_q: turns the eleven comparator outputs of a 12-level sensing
// circuit into the 4-bit quantised read 0..11 by counting the comparators
// that fired (a population count, so a bubble in the thermometer code costs
// at most one level). Combinational.
module therm_to_q
  import tcm_pkg::*;
#(
  parameter int unsigned NREF = N_REFS
) (
  input  logic [NREF-1:0] comp_i,
  output qread_t          q_o
);
  always_comb begin
    q_o = '0;
    for (int i = 0; i < NREF; i++) q_o += qread_t'(comp_i[i]);
  end
endmodule
