// tcm_ecc_system: one TCM on-chip ECC system for DATA_BITS-bit words of a
// 2-bit/cell flash memory. Write side: tcm_encoder turns a word into
// num_cells(DATA_BITS) cell levels for the program circuitry (one cycle).
// Read side: the cell read values of a stored word go through 12-level
// sensing, TCM demodulation and Viterbi decoding back to the word.
// PARALLEL_READ selects the single-cycle read path with an unrolled decoder
// (default for 16-bit words) or the step-serial one (32 and 64 bits).
// Read timing: see read_path_par (valid one cycle after rd_start_i) and
// read_path_seq (valid NSTEP+2 cycles after rd_start_i).
module tcm_ecc_system
  import tcm_pkg::*;
#(
  parameter int unsigned DATA_BITS     = 64,
  parameter bit          PARALLEL_READ = (DATA_BITS <= 16),
  localparam int unsigned NCELL = num_cells(DATA_BITS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // write (encode) side
  input  logic                 wr_valid_i,
  input  logic [DATA_BITS-1:0] wr_data_i,
  output logic                 prog_valid_o,
  output level_t               prog_cells_o [NCELL],
  // read (decode) side
  input  logic                 rd_start_i,
  input  analog_t              rd_cells_i [NCELL],
  output logic                 rd_busy_o,
  output logic                 rd_valid_o,
  output logic [DATA_BITS-1:0] rd_data_o
);
  tcm_encoder #(.DATA_BITS(DATA_BITS)) u_enc (
    .clk(clk), .rst_n(rst_n), .valid_i(wr_valid_i), .data_i(wr_data_i),
    .valid_o(prog_valid_o), .cells_o(prog_cells_o)
  );

  if (PARALLEL_READ) begin : g_par
    read_path_par #(.DATA_BITS(DATA_BITS)) u_rd (
      .clk(clk), .rst_n(rst_n), .start_i(rd_start_i), .cells_i(rd_cells_i),
      .valid_o(rd_valid_o), .data_o(rd_data_o)
    );
    assign rd_busy_o = 1'b0;
  end else begin : g_seq
    read_path_seq #(.DATA_BITS(DATA_BITS)) u_rd (
      .clk(clk), .rst_n(rst_n), .start_i(rd_start_i), .cells_i(rd_cells_i),
      .busy_o(rd_busy_o), .valid_o(rd_valid_o), .data_o(rd_data_o)
    );
  end
endmodule
