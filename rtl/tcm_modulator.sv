// tcm_modulator: m-D signal mapper of the TCM encoder. Maps one step onto
// 4 (4-D), 3 (3-D) or 2 (2-D) 4-level cells. Combinational.
//
// 4-D: the coded bits z select one of 8 subsets of the 4x4x4x4 cell lattice,
// each the union of two cosets of 2Z^4 (cell parities p and p^1111). The
// uncoded bits unc = {h4,h3,h2,h1,u} choose the coset (u) and the upper bit of
// every cell, so cell i stores level {h_i, p_i}. Parities are
// p1=u, p2=u^z1, p3=u^z2, p4=u^z0^z1^z2 (three-level set partitioning).
// 3-D: cells 1-2 as in 4-D (unc = {h2,h1,u}); the 2-D constellation of cells
// 3-4 is collapsed onto one cell whose level is {p3,p4}.
// 2-D: four uncoded bits go straight to two cells, cell1 = unc[1:0],
// cell2 = unc[3:2]; z is ignored.
// The reduced 3-D/2-D forms follow the word format; the labelling and the
// collapse mapping are this design's choice. Unused cell outputs are 0.
module tcm_modulator
  import tcm_pkg::*;
(
  input  step_kind_e kind_i,
  input  logic [2:0] z_i,
  input  unc_t       unc_i,
  output level_t     cell_o [4]
);
  logic [3:0] p;

  always_comb begin
    p = subset_parity(z_i, unc_i[0]);
    cell_o = '{default: level_t'(0)};
    unique case (kind_i)
      STEP_4D: begin
        cell_o[0] = {unc_i[1], p[0]};
        cell_o[1] = {unc_i[2], p[1]};
        cell_o[2] = {unc_i[3], p[2]};
        cell_o[3] = {unc_i[4], p[3]};
      end
      STEP_3D: begin
        cell_o[0] = {unc_i[1], p[0]};
        cell_o[1] = {unc_i[2], p[1]};
        cell_o[2] = {p[2], p[3]};
      end
      default: begin  // STEP_2D
        cell_o[0] = unc_i[1:0];
        cell_o[1] = unc_i[3:2];
      end
    endcase
  end
endmodule
