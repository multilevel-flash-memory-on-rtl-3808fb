// tcm_encoder: TCM encoder for one DATA_BITS-bit word (write path).
//
// The word is spread over num_steps(DATA_BITS) steps of 7 bits; bit positions
// forced to zero for code termination are skipped, and the data fill the
// remaining positions in order (step 0 first, bit 0 first). Each step runs
// through conv_encoder (bits 0 and 1) and tcm_modulator (bits 2..6), the
// trellis state chaining from step to step starting at state 0. The whole word
// is encoded in one cycle: data_i is sampled when valid_i is high and the
// cell levels appear on cells_o with valid_o one clock later.
// DATA_BITS 16, 32 and 64 give 11, 20 and 38 cells.
module tcm_encoder
  import tcm_pkg::*;
#(
  parameter int unsigned DATA_BITS = 64,
  localparam int unsigned NSTEP = num_steps(DATA_BITS),
  localparam int unsigned NCELL = num_cells(DATA_BITS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 valid_i,
  input  logic [DATA_BITS-1:0] data_i,
  output logic                 valid_o,
  output level_t               cells_o [NCELL]
);
  if (!word_size_ok(DATA_BITS)) begin : g_bad_size
    $error("tcm_encoder: unsupported DATA_BITS");
  end

  logic [N_IN*NSTEP-1:0] frame;
  logic [2:0]            st    [NSTEP+1];
  logic [2:0]            z     [NSTEP];
  level_t                lv    [NSTEP][4];
  level_t                cells [NCELL];

  // scatter the data bits into the step frame
  always_comb begin
    int j;
    j = 0;
    frame = '0;
    for (int s = 0; s < NSTEP; s++)
      for (int b = 0; b < N_IN; b++)
        if (is_data(DATA_BITS, s, b)) begin
          frame[N_IN*s+b] = data_i[j];
          j++;
        end
  end

  assign st[0] = 3'd0;

  for (genvar s = 0; s < NSTEP; s++) begin : g_step
    localparam step_kind_e KIND = step_kind(DATA_BITS, s);
    localparam int unsigned BASE = 4 * s;
    if (KIND == STEP_2D) begin : g_bypass
      assign z[s]     = 3'd0;
      assign st[s+1]  = st[s];
    end else begin : g_coded
      conv_encoder u_conv (
        .state_i (st[s]),
        .x_i     (frame[N_IN*s +: 2]),
        .z_o     (z[s]),
        .state_o (st[s+1])
      );
    end
    tcm_modulator u_mod (
      .kind_i (KIND),
      .z_i    (z[s]),
      .unc_i  ((KIND == STEP_2D) ? unc_t'(frame[N_IN*s +: 4]) : frame[N_IN*s+2 +: UNC_W]),
      .cell_o (lv[s])
    );
    for (genvar c = 0; c < step_cells(KIND); c++) begin : g_cell
      assign cells[BASE+c] = lv[s][c];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_o <= 1'b0;
      cells_o <= '{default: level_t'(0)};
    end else begin
      valid_o <= valid_i;
      if (valid_i) cells_o <= cells;
    end
  end
endmodule
