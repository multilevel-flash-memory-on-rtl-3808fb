// read_path_par: fully parallel read datapath, used by the 16-bit system.
// Every cell of the word has its own 12-level sensing circuit (11 for 16 bits),
// every step its own demodulator (two 4-D and one 3-D for 16 bits), and the
// unrolled Viterbi decoder decodes all steps at once, so a whole word is
// sensed, demodulated and decoded in a single clock cycle.
// Timing: cells_i must be stable while start_i is high; data_o and valid_o
// are registered and valid_o is high in the cycle after start_i. A 2-D step,
// should the word format have one, reuses a 4-D demodulator on two cells.
module read_path_par
  import tcm_pkg::*;
#(
  parameter int unsigned DATA_BITS = 16,
  localparam int unsigned NSTEP = num_steps(DATA_BITS),
  localparam int unsigned NCELL = num_cells(DATA_BITS),
  localparam int unsigned FW    = N_IN * NSTEP
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start_i,
  input  analog_t              cells_i [NCELL],
  output logic                 valid_o,
  output logic [DATA_BITS-1:0] data_o
);
  if (!word_size_ok(DATA_BITS)) begin : g_bad_size
    $error("read_path_par: unsupported DATA_BITS");
  end

  qread_t                q    [NCELL];
  bm_vec_t               bm   [NSTEP];
  dec_vec_t              dec  [NSTEP];
  logic [3:0]            pt2d [NSTEP];
  logic [FW-1:0]         frame;
  logic [DATA_BITS-1:0]  data;

  for (genvar c = 0; c < NCELL; c++) begin : g_sense
    logic [N_REFS-1:0] comp;
    sense_12level u_sense (.cell_i(cells_i[c]), .comp_o(comp));
    therm_to_q    u_q     (.comp_i(comp), .q_o(q[c]));
  end

  for (genvar s = 0; s < NSTEP; s++) begin : g_demod
    localparam step_kind_e KIND = step_kind(DATA_BITS, s);
    localparam int unsigned BASE = 4 * s;
    if (KIND == STEP_3D) begin : g_3d
      tcm_demod_3d u_dm (.q_i(q[BASE +: 3]), .bm_o(bm[s]), .dec_o(dec[s]));
      assign pt2d[s] = 4'd0;
    end else if (KIND == STEP_2D) begin : g_2d
      qread_t q4 [4];
      assign q4 = '{q[BASE], q[BASE+1], qread_t'(0), qread_t'(0)};
      tcm_demod_4d u_dm (.q_i(q4), .bm_o(bm[s]), .dec_o(dec[s]), .pt2d_o(pt2d[s]));
    end else begin : g_4d
      tcm_demod_4d u_dm (.q_i(q[BASE +: 4]), .bm_o(bm[s]), .dec_o(dec[s]), .pt2d_o(pt2d[s]));
    end
  end

  viterbi_unrolled #(.DATA_BITS(DATA_BITS)) u_vit (
    .bm_i(bm), .dec_i(dec), .pt2d_i(pt2d), .frame_o(frame)
  );

  // gather the user bits out of the decoded step frame
  always_comb begin
    int j;
    j = 0;
    data = '0;
    for (int s = 0; s < NSTEP; s++)
      for (int b = 0; b < N_IN; b++)
        if (is_data(DATA_BITS, s, b)) begin
          data[j] = frame[N_IN*s+b];
          j++;
        end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_o <= 1'b0;
      data_o  <= '0;
    end else begin
      valid_o <= start_i;
      if (start_i) data_o <= data;
    end
  end
endmodule
