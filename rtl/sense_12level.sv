// sense_12level: behavioural model of the current-mode 12-level parallel
// sensing circuit (analog part, not synthesizable logic in the real chip).
// The selected cell's current is compared at once with the currents of eleven
// programmed reference cells by eleven current comparators COMP1..COMP11;
// their outputs form a thermometer code. Here the cell current is represented
// by an ANALOG_W-bit read-value code and comparator i fires when the cell
// value is at least reference i (references ascending, defaults from
// tcm_pkg::SENSE_REF). The model has no delay; the real circuit resolves in a
// few hundred picoseconds, well inside one clock cycle of the read path.
module sense_12level
  import tcm_pkg::*;
#(
  parameter int unsigned NREF = N_REFS,
  parameter int          REFS [NREF] = SENSE_REF
) (
  input  analog_t         cell_i,   // selected cell current (read-value code)
  output logic [NREF-1:0] comp_o    // comp_o[i] = COMP(i+1)
);
  always_comb begin
    for (int i = 0; i < NREF; i++)
      comp_o[i] = int'(cell_i) >= REFS[i];
  end
endmodule
