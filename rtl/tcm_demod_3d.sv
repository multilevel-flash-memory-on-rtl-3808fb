// tcm_demod_3d: 3-D demodulator for a final 3-D step. Cells 1-2 go through
// demod_1d and demod_2d as in the 4-D demodulator. The third cell stands for
// the collapsed 2-D constellation of cells 3-4: the 2-D subset with parities
// {p4,p3} is the single level {p3,p4}, so its metric is that level's cell
// metric and it has no decision bits. The demod_4d stage then combines as
// usual; dec_o[z][2:0] = {h2,h1,u} are the meaningful decision bits.
// Combinational.
module tcm_demod_3d
  import tcm_pkg::*;
(
  input  qread_t   q_i [3],
  output bm_vec_t  bm_o,
  output dec_vec_t dec_o
);
  bm1_t       m1 [2][2];
  logic       h1 [2][2];
  bm2_t       m2a [4];
  logic [1:0] d2a [4];
  bm2_t       m2b [4];
  logic [1:0] d2b [4];

  for (genvar c = 0; c < 2; c++) begin : g_1d
    demod_1d u_1d (.q_i(q_i[c]), .metric_o(m1[c]), .h_o(h1[c]));
  end

  demod_2d u_2d (
    .ma_i(m1[0]), .ha_i(h1[0]), .mb_i(m1[1]), .hb_i(h1[1]),
    .metric_o(m2a), .dec_o(d2a)
  );

  // collapsed constellation: index j = {p4,p3} -> level {p3,p4}
  always_comb begin
    for (int j = 0; j < 4; j++) begin
      m2b[j] = bm2_t'(cell_metric(q_i[2], level_t'({j[0], j[1]})));
      d2b[j] = 2'b00;
    end
  end

  demod_4d u_4d (
    .ma_i(m2a), .da_i(d2a), .mb_i(m2b), .db_i(d2b),
    .bm_o(bm_o), .dec_o(dec_o)
  );
endmodule
