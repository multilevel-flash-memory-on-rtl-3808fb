// tcm_demod_4d: 4-D demodulator. Four demod_1d stages (one per cell), two
// demod_2d stages (cells 1-2 and 3-4) and one demod_4d stage, as a
// hierarchical tree. Input: the 12-level reads of four cells. Output: the 8
// branch metrics (6 bits) and branch symbol decisions (5 uncoded bits per
// subset) for one trellis step, plus pt2d_o, the closest point of the whole
// 2-D constellation of cells 1-2 as four bits {h2,p2,h1,p1}; that last output
// decodes a 2-D step that bypasses the convolutional code. Combinational.
module tcm_demod_4d
  import tcm_pkg::*;
(
  input  qread_t     q_i [4],
  output bm_vec_t    bm_o,
  output dec_vec_t   dec_o,
  output logic [3:0] pt2d_o
);
  bm1_t       m1 [4][2];
  logic       h1 [4][2];
  bm2_t       m2 [2][4];
  logic [1:0] d2 [2][4];

  for (genvar c = 0; c < 4; c++) begin : g_1d
    demod_1d u_1d (.q_i(q_i[c]), .metric_o(m1[c]), .h_o(h1[c]));
  end

  for (genvar g = 0; g < 2; g++) begin : g_2d
    demod_2d u_2d (
      .ma_i(m1[2*g]), .ha_i(h1[2*g]), .mb_i(m1[2*g+1]), .hb_i(h1[2*g+1]),
      .metric_o(m2[g]), .dec_o(d2[g])
    );
  end

  demod_4d u_4d (
    .ma_i(m2[0]), .da_i(d2[0]), .mb_i(m2[1]), .db_i(d2[1]),
    .bm_o(bm_o), .dec_o(dec_o)
  );

  // best point of the uncoded 2-D constellation (cells 1-2)
  always_comb begin
    int best;
    best = 0;
    for (int j = 1; j < 4; j++)
      if (m2[0][j] < m2[0][best]) best = j;
    pt2d_o = {d2[0][best][1], 1'(best / 2), d2[0][best][0], 1'(best % 2)};
  end
endmodule
