// tcm_flash_top: the three TCM on-chip ECC systems for a 2-bit/cell flash
// memory side by side: 16-bit words in 11 cells (parallel read, unrolled
// Viterbi), 32-bit words in 20 cells and 64-bit words in 38 cells (step-serial
// read, one trellis step per clock). The cell array itself is outside: each
// system brings out the levels to program (prog*_cells_o) and takes the read
// values of the selected word's cells (rd*_cells_i). Port timing is that of
// tcm_ecc_system.
module tcm_flash_top
  import tcm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // 16-bit system
  input  logic        wr16_valid_i,
  input  logic [15:0] wr16_data_i,
  output logic        prog16_valid_o,
  output level_t      prog16_cells_o [11],
  input  logic        rd16_start_i,
  input  analog_t     rd16_cells_i [11],
  output logic        rd16_valid_o,
  output logic [15:0] rd16_data_o,
  // 32-bit system
  input  logic        wr32_valid_i,
  input  logic [31:0] wr32_data_i,
  output logic        prog32_valid_o,
  output level_t      prog32_cells_o [20],
  input  logic        rd32_start_i,
  input  analog_t     rd32_cells_i [20],
  output logic        rd32_busy_o,
  output logic        rd32_valid_o,
  output logic [31:0] rd32_data_o,
  // 64-bit system
  input  logic        wr64_valid_i,
  input  logic [63:0] wr64_data_i,
  output logic        prog64_valid_o,
  output level_t      prog64_cells_o [38],
  input  logic        rd64_start_i,
  input  analog_t     rd64_cells_i [38],
  output logic        rd64_busy_o,
  output logic        rd64_valid_o,
  output logic [63:0] rd64_data_o
);
  logic unused_busy16;

  tcm_ecc_system #(.DATA_BITS(16)) u_sys16 (
    .clk(clk), .rst_n(rst_n),
    .wr_valid_i(wr16_valid_i), .wr_data_i(wr16_data_i),
    .prog_valid_o(prog16_valid_o), .prog_cells_o(prog16_cells_o),
    .rd_start_i(rd16_start_i), .rd_cells_i(rd16_cells_i),
    .rd_busy_o(unused_busy16), .rd_valid_o(rd16_valid_o), .rd_data_o(rd16_data_o)
  );

  tcm_ecc_system #(.DATA_BITS(32)) u_sys32 (
    .clk(clk), .rst_n(rst_n),
    .wr_valid_i(wr32_valid_i), .wr_data_i(wr32_data_i),
    .prog_valid_o(prog32_valid_o), .prog_cells_o(prog32_cells_o),
    .rd_start_i(rd32_start_i), .rd_cells_i(rd32_cells_i),
    .rd_busy_o(rd32_busy_o), .rd_valid_o(rd32_valid_o), .rd_data_o(rd32_data_o)
  );

  tcm_ecc_system #(.DATA_BITS(64)) u_sys64 (
    .clk(clk), .rst_n(rst_n),
    .wr_valid_i(wr64_valid_i), .wr_data_i(wr64_data_i),
    .prog_valid_o(prog64_valid_o), .prog_cells_o(prog64_cells_o),
    .rd_start_i(rd64_start_i), .rd_cells_i(rd64_cells_i),
    .rd_busy_o(rd64_busy_o), .rd_valid_o(rd64_valid_o), .rd_data_o(rd64_data_o)
  );
endmodule
