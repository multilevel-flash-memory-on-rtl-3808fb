// demod_4d: last stage of the 4-D demodulator. Each 4-D subset z is the union
// of two pairs of 2-D subsets, (qa,qb) and (qa^3,qb^3), where the 2-D indices
// come from the subset parities (qa = {p2,p1}, qb = {p4,p3}) for coset choice
// u = 0 and u = 1. For each of the 8 subsets it adds the two 2-D metrics of
// both pairs, keeps the smaller (6-bit branch metric; ties keep u = 0) and
// returns the uncoded-bit decision {h4,h3,h2,h1,u}. Combinational.
// The 3-D demodulator reuses this stage with a collapsed second pair.
module demod_4d
  import tcm_pkg::*;
(
  input  bm2_t       ma_i [4],   // 2-D metrics, cells 1-2
  input  logic [1:0] da_i [4],
  input  bm2_t       mb_i [4],   // 2-D metrics, cells 3-4
  input  logic [1:0] db_i [4],
  output bm_vec_t    bm_o,
  output dec_vec_t   dec_o
);
  always_comb begin
    for (int z = 0; z < N_SUBSET; z++) begin
      logic [3:0] p0, p1;
      bm_t        s0, s1;
      p0 = subset_parity(3'(z), 1'b0);
      p1 = subset_parity(3'(z), 1'b1);
      s0 = bm_t'(ma_i[p0[1:0]]) + bm_t'(mb_i[p0[3:2]]);
      s1 = bm_t'(ma_i[p1[1:0]]) + bm_t'(mb_i[p1[3:2]]);
      if (s1 < s0) begin
        bm_o[z]  = s1;
        dec_o[z] = {db_i[p1[3:2]], da_i[p1[1:0]], 1'b1};
      end else begin
        bm_o[z]  = s0;
        dec_o[z] = {db_i[p0[3:2]], da_i[p0[1:0]], 1'b0};
      end
    end
  end
endmodule
