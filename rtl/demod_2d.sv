// demod_2d: second stage of the 4-D demodulator. Combines the 1-D results of
// two cells (a = first, b = second) into the four 2-D subsets, indexed
// j = {pb, pa} by the two cell parities. The closest point of a 2-D subset is
// the pair of closest 1-D points, and its metric is their sum (5 bits).
// dec_o[j] = {hb, ha}. Combinational.
module demod_2d
  import tcm_pkg::*;
(
  input  bm1_t         ma_i [2],
  input  logic         ha_i [2],
  input  bm1_t         mb_i [2],
  input  logic         hb_i [2],
  output bm2_t         metric_o [4],
  output logic [1:0]   dec_o    [4]
);
  always_comb begin
    for (int j = 0; j < 4; j++) begin
      metric_o[j] = bm2_t'(ma_i[j%2]) + bm2_t'(mb_i[j/2]);
      dec_o[j]    = {hb_i[j/2], ha_i[j%2]};
    end
  end
endmodule
