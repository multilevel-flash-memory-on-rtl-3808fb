// viterbi_unrolled: Viterbi decoder with the recursive datapath unrolled over
// all steps of the word (the 16-bit system has only 3 steps). NSTEP
// viterbi_acs stages are chained combinationally from the known start state 0,
// with register exchange carried along, and the survivor of state 0 after the
// last (terminated) step is the decoded frame. With termination pruning the
// 16-bit trellis has only 8 complete paths, so the chain is short.
// Combinational: the caller registers the result.
// Unrolling the decoder for the 16-bit word follows the published design; any
// further trimming of the unrolled logic is left to synthesis here. The path
// metrics of the last stage are not needed (only the state-0 survivor is
// read), so that stage's pm_out stays unused and lint reports it.
module viterbi_unrolled
  import tcm_pkg::*;
#(
  parameter int unsigned DATA_BITS = 16,
  localparam int unsigned NSTEP = num_steps(DATA_BITS),
  localparam int unsigned FW    = N_IN * NSTEP
) (
  input  bm_vec_t       bm_i   [NSTEP],
  input  dec_vec_t      dec_i  [NSTEP],
  input  logic [3:0]    pt2d_i [NSTEP],
  output logic [FW-1:0] frame_o
);
  for (genvar s = 0; s < NSTEP; s++) begin : g_step
    pm_vec_t       pm_in, pm_out;
    logic [FW-1:0] surv_in  [N_STATES];
    logic [FW-1:0] surv_out [N_STATES];
    logic [2:0]    prev     [N_STATES];
    step_bits_t    bits     [N_STATES];

    if (s == 0) begin : g_first
      // the encoder starts in state 0
      always_comb begin
        pm_in    = '{default: PM_INF};
        pm_in[0] = '0;
        surv_in  = '{default: '0};
      end
    end else begin : g_next
      assign pm_in   = g_step[s-1].pm_out;
      assign surv_in = g_step[s-1].surv_out;
    end

    viterbi_acs u_acs (
      .pm_i          (pm_in),
      .bm_i          (bm_i[s]),
      .dec_i         (dec_i[s]),
      .x1_ok_i       (x1_free(DATA_BITS, s)),
      .x2_ok_i       (x2_free(DATA_BITS, s)),
      .bypass_i      (step_kind(DATA_BITS, s) == STEP_2D),
      .bypass_bits_i (pt2d_i[s]),
      .pm_o          (pm_out),
      .prev_o        (prev),
      .bits_o        (bits)
    );

    always_comb begin
      for (int n = 0; n < N_STATES; n++)
        surv_out[n] = {bits[n], surv_in[prev[n]][FW-1:N_IN]};
    end
  end

  assign frame_o = g_step[NSTEP-1].surv_out[0];
endmodule
