// read_path_seq: step-serial read datapath, used by the 32- and 64-bit
// systems. Four 12-level sensing circuits and one 4-D demodulator are shared
// by all steps: a column selector connects the four cells of step t to the
// sensing circuits, the demodulator's branch metrics and decisions are
// registered, and the register-exchange Viterbi decoder consumes one step per
// clock. A final 2-D step (64 bits) uses the demodulator's 2-D decision and
// bypasses the trellis; a final 3-D step, if the word format has one, gets a
// 3-D demodulator.
// Timing: start_i (while idle) begins a read; cells_i must stay stable until
// valid_o. Steps are sensed in the NSTEP cycles after start_i and valid_o
// (with data_o) is high for one cycle, NSTEP+2 cycles after the start cycle
// (12 for 64 bits, 7 for 32 bits). busy_o is high from start to valid_o.
module read_path_seq
  import tcm_pkg::*;
#(
  parameter int unsigned DATA_BITS = 64,
  localparam int unsigned NSTEP = num_steps(DATA_BITS),
  localparam int unsigned NCELL = num_cells(DATA_BITS),
  localparam int unsigned FW    = N_IN * NSTEP
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start_i,
  input  analog_t              cells_i [NCELL],
  output logic                 busy_o,
  output logic                 valid_o,
  output logic [DATA_BITS-1:0] data_o
);
  if (!word_size_ok(DATA_BITS)) begin : g_bad_size
    $error("read_path_seq: unsupported DATA_BITS");
  end

  localparam int unsigned CW = $clog2(NSTEP + 1);
  localparam bit HAS_3D = step_kind(DATA_BITS, NSTEP - 1) == STEP_3D;

  typedef enum logic {S_IDLE, S_SENSE} state_e;
  state_e        state;
  logic [CW-1:0] step;
  logic          vit_busy;

  analog_t    sel  [4];
  qread_t     q    [4];
  bm_vec_t    bm4, bm3, bm_q;
  dec_vec_t   dec4, dec3, dec_q;
  logic [3:0] pt2d, pt2d_q;
  logic       in_valid;
  logic       done;
  logic [FW-1:0] frame;

  // column selector: the cells of the current step, 0 beyond the word
  always_comb begin
    for (int c = 0; c < 4; c++) begin
      sel[c] = '0;
      for (int i = 0; i < NCELL; i++)
        if (i == 4 * int'(step) + c) sel[c] = cells_i[i];
    end
  end

  for (genvar c = 0; c < 4; c++) begin : g_sense
    logic [N_REFS-1:0] comp;
    sense_12level u_sense (.cell_i(sel[c]), .comp_o(comp));
    therm_to_q    u_q     (.comp_i(comp), .q_o(q[c]));
  end

  tcm_demod_4d u_dm4 (.q_i(q), .bm_o(bm4), .dec_o(dec4), .pt2d_o(pt2d));

  if (HAS_3D) begin : g_3d
    tcm_demod_3d u_dm3 (.q_i(q[0:2]), .bm_o(bm3), .dec_o(dec3));
  end else begin : g_no3d
    assign bm3  = '0;
    assign dec3 = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      step     <= '0;
      in_valid <= 1'b0;
      bm_q     <= '0;
      dec_q    <= '0;
      pt2d_q   <= '0;
      vit_busy <= 1'b0;
    end else begin
      in_valid <= 1'b0;
      if (done) vit_busy <= 1'b0;
      unique case (state)
        S_IDLE: if (start_i && !vit_busy) begin
          state    <= S_SENSE;
          step     <= '0;
          vit_busy <= 1'b1;
        end
        S_SENSE: begin
          if (HAS_3D && int'(step) == NSTEP - 1) begin
            bm_q  <= bm3;
            dec_q <= dec3;
          end else begin
            bm_q  <= bm4;
            dec_q <= dec4;
          end
          pt2d_q   <= pt2d;
          in_valid <= 1'b1;
          step     <= step + 1'b1;
          if (int'(step) == NSTEP - 1) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  viterbi_rx #(.DATA_BITS(DATA_BITS)) u_vit (
    .clk(clk), .rst_n(rst_n),
    .start_i(start_i && state == S_IDLE && !vit_busy),
    .in_valid_i(in_valid), .bm_i(bm_q), .dec_i(dec_q), .pt2d_i(pt2d_q),
    .done_o(done), .frame_o(frame)
  );

  always_comb begin
    int j;
    j = 0;
    data_o = '0;
    for (int s = 0; s < NSTEP; s++)
      for (int b = 0; b < N_IN; b++)
        if (is_data(DATA_BITS, s, b)) begin
          data_o[j] = frame[N_IN*s+b];
          j++;
        end
  end

  assign valid_o = done;
  assign busy_o  = vit_busy;
endmodule
