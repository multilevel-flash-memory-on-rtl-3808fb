// viterbi_acs: add-compare-select for all 8 trellis states of one step
// (state-parallel). Combinational; used once per clock by viterbi_rx and
// chained by viterbi_unrolled.
//
// State n is reached from the four states s = {c1, n[2], c0} with input
// x = n[1:0] = {x2, x1}; the branch carries subset z = conv_out(s, x). The
// candidate metric is pm[s] + bm[z] (saturating at PM_INF, so unreachable
// states stay unreachable); branches whose x1 or x2 is forced to zero by
// termination (x1_ok_i / x2_ok_i low) are excluded. Ties keep the lowest c.
// For each state the survivor's predecessor (prev_o) and the 7 decoded bits
// of the step, {u-bits of dec[z], x2, x1}, are returned for register exchange.
// When bypass_i is set (a 2-D step outside the code) metrics pass unchanged
// and every state records {3'b0, bypass_bits_i}.
module viterbi_acs
  import tcm_pkg::*;
(
  input  pm_vec_t     pm_i,
  input  bm_vec_t     bm_i,
  input  dec_vec_t    dec_i,
  input  logic        x1_ok_i,
  input  logic        x2_ok_i,
  input  logic        bypass_i,
  input  logic [3:0]  bypass_bits_i,
  output pm_vec_t     pm_o,
  output logic [2:0]  prev_o [N_STATES],
  output step_bits_t  bits_o [N_STATES]
);
  function automatic pm_t sat_add(pm_t a, bm_t b);
    logic [PM_W:0] s;
    s = {1'b0, a} + (PM_W+1)'(b);
    return (a == PM_INF || s[PM_W] || s[PM_W-1:0] == PM_INF) ? PM_INF : s[PM_W-1:0];
  endfunction

  always_comb begin
    for (int n = 0; n < N_STATES; n++) begin
      logic [1:0] x;
      logic [2:0] s, z, best_s;
      pm_t        cand, best;
      x      = 2'(n);
      best   = PM_INF;
      best_s = {1'b0, 1'(n / 4), 1'b0};
      z      = conv_out(best_s, x);
      bits_o[n] = {dec_i[z], x};
      if ((x[0] && !x1_ok_i) || (x[1] && !x2_ok_i)) begin
        best = PM_INF;
      end else begin
        for (int c = 0; c < 4; c++) begin
          s    = {1'(c / 2), 1'(n / 4), 1'(c % 2)};
          z    = conv_out(s, x);
          cand = sat_add(pm_i[s], bm_i[z]);
          if (cand < best) begin
            best      = cand;
            best_s    = s;
            bits_o[n] = {dec_i[z], x};
          end
        end
      end
      if (bypass_i) begin
        pm_o[n]   = pm_i[n];
        prev_o[n] = 3'(n);
        bits_o[n] = {3'b000, bypass_bits_i};
      end else begin
        pm_o[n]   = best;
        prev_o[n] = best_s;
      end
    end
  end
endmodule
