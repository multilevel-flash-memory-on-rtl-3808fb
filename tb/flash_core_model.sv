// flash_core_model: behavioural stand-in for the 2-bit/cell flash cell array,
// for testbenches only. WORDS words of NCELL cells. Programming stores a level
// per cell together with a signed read-value offset per cell, which the
// testbench uses to place the cell anywhere in its threshold distribution
// (noise, or a cell that has drifted towards a neighbouring level). A read
// returns, combinationally, the read-value code of every cell of the
// addressed word: the level's mean plus the offset, clipped to 0..255.
module flash_core_model
  import tcm_pkg::*;
#(
  parameter int unsigned NCELL = 11,
  parameter int unsigned WORDS = 16
) (
  input  logic                     clk,
  input  logic                     prog_en_i,
  input  logic [$clog2(WORDS)-1:0] prog_addr_i,
  input  level_t                   prog_cells_i  [NCELL],
  input  int                       prog_offset_i [NCELL],
  input  logic [$clog2(WORDS)-1:0] rd_addr_i,
  output analog_t                  rd_cells_o    [NCELL]
);
  level_t lv  [WORDS][NCELL];
  int     off [WORDS][NCELL];

  initial begin
    for (int w = 0; w < WORDS; w++)
      for (int c = 0; c < NCELL; c++) begin
        lv[w][c]  = '0;
        off[w][c] = 0;
      end
  end

  always @(posedge clk)
    if (prog_en_i)
      for (int c = 0; c < NCELL; c++) begin
        lv[prog_addr_i][c]  <= prog_cells_i[c];
        off[prog_addr_i][c] <= prog_offset_i[c];
      end

  always_comb
    for (int c = 0; c < NCELL; c++) begin
      int v;
      v = LEVEL_MU[lv[rd_addr_i][c]] + off[rd_addr_i][c];
      rd_cells_o[c] = analog_t'((v < 0) ? 0 : (v > 255) ? 255 : v);
    end
endmodule
