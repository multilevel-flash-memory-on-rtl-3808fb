// viterbi_rx: state-parallel register-exchange Viterbi decoder that runs one
// trellis step per clock (the read path of the 32- and 64-bit systems).
//
// start_i clears the decoder: path metric 0 for state 0 (the encoder starts
// there), PM_INF elsewhere, step counter 0. Every cycle with in_valid_i the
// branch metrics and decisions of the next step are taken: viterbi_acs updates
// all 8 path metrics, and each state's survivor register (NSTEP*7 bits) is
// replaced by its predecessor's survivor shifted down by one step with the new
// 7 bits on top. Termination pruning and the 2-D bypass step follow the word
// format of tcm_pkg. After the last step the survivor of state 0 (the
// terminated state) is the decoded frame: frame_o is loaded and done_o pulses
// for one cycle, one clock after the last step was presented.
module viterbi_rx
  import tcm_pkg::*;
#(
  parameter int unsigned DATA_BITS = 64,
  localparam int unsigned NSTEP = num_steps(DATA_BITS),
  localparam int unsigned FW    = N_IN * NSTEP
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start_i,
  input  logic          in_valid_i,
  input  bm_vec_t       bm_i,
  input  dec_vec_t      dec_i,
  input  logic [3:0]    pt2d_i,
  output logic          done_o,
  output logic [FW-1:0] frame_o
);
  localparam int unsigned CW = $clog2(NSTEP + 1);

  pm_vec_t         pm, pm_n;
  logic [FW-1:0]   surv [N_STATES];
  logic [2:0]      prev [N_STATES];
  step_bits_t      bits [N_STATES];
  logic [CW-1:0]   step;
  logic            last;

  viterbi_acs u_acs (
    .pm_i          (pm),
    .bm_i          (bm_i),
    .dec_i         (dec_i),
    .x1_ok_i       (x1_free(DATA_BITS, int'(step))),
    .x2_ok_i       (x2_free(DATA_BITS, int'(step))),
    .bypass_i      (step_kind(DATA_BITS, int'(step)) == STEP_2D),
    .bypass_bits_i (pt2d_i),
    .pm_o          (pm_n),
    .prev_o        (prev),
    .bits_o        (bits)
  );

  assign last = (int'(step) == NSTEP - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pm      <= '{default: PM_INF};
      surv    <= '{default: '0};
      step    <= '0;
      done_o  <= 1'b0;
      frame_o <= '0;
    end else begin
      done_o <= 1'b0;
      if (start_i) begin
        pm    <= '{default: PM_INF};
        pm[0] <= '0;
        surv  <= '{default: '0};
        step  <= '0;
      end else if (in_valid_i && int'(step) < NSTEP) begin
        pm <= pm_n;
        for (int n = 0; n < N_STATES; n++)
          surv[n] <= {bits[n], surv[prev[n]][FW-1:N_IN]};
        step <= step + 1'b1;
        if (last) begin
          frame_o <= {bits[0], surv[prev[0]][FW-1:N_IN]};
          done_o  <= 1'b1;
        end
      end
    end
  end
endmodule
