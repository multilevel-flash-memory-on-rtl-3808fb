// demod_1d: first stage of the 4-D demodulator, one per cell. For each of the
// two 1-D subsets of the 4-level cell (even levels {0,2}, odd levels {1,3};
// index = level parity p) it finds the level closest to the 12-level read q
// and that level's metric. Combinational.
//   metric_o[p] = min(cell_metric(q,{0,p}), cell_metric(q,{1,p}))
//   h_o[p]      = upper bit of the winning level (ties pick the lower level)
// cell_metric is the 4-bit negative log-likelihood of tcm_pkg.
module demod_1d
  import tcm_pkg::*;
(
  input  qread_t q_i,
  output bm1_t   metric_o [2],
  output logic   h_o      [2]
);
  always_comb begin
    for (int p = 0; p < 2; p++) begin
      bm1_t lo, hi;
      lo = cell_metric(q_i, level_t'({1'b0, p[0]}));
      hi = cell_metric(q_i, level_t'({1'b1, p[0]}));
      h_o[p]      = hi < lo;
      metric_o[p] = (hi < lo) ? hi : lo;
    end
  end
endmodule
