// tcm_pkg: types, constants and code-structure functions shared by the TCM
// on-chip ECC for 2-bit/cell (4-level) flash memory.
//
// The code follows the system parameters n=7, k=2, r=1, m=4, memory order 3
// and 12-level read quantisation. One trellis step takes 7 input bits: x1 and
// x2 enter a rate-2/3 8-state convolutional encoder whose 3 output bits pick
// one of 8 4-D subsets (the cosets of 2Z^4 u (2Z^4+1111) in Z^4); the other 5
// bits pick the point inside the subset. An N-bit word plus 3 termination
// zeros is cut into steps: (N+3) mod 7 = 0 gives only 4-D steps, 5 gives a
// final 3-D coded step and 4 gives a final 2-D step that bypasses the
// convolutional code (16, 32 and 64 bit words respectively).
//
// Design choices not taken from elsewhere: the encoder equations, the subset
// labelling, the bit order inside a step, the cell read-value scale, the
// reference currents and the metric formula below.
package tcm_pkg;

  // ---- code parameters ---------------------------------------------------
  localparam int unsigned N_IN     = 7;   // input bits per step (n)
  localparam int unsigned MEM      = 3;   // convolutional code memory order
  localparam int unsigned N_STATES = 8;   // 2**MEM trellis states
  localparam int unsigned N_SUBSET = 8;   // 2**(k+r) 4-D subsets
  localparam int unsigned UNC_W    = 5;   // uncoded bits per 4-D step (n-k)
  localparam int unsigned N_REFS   = 11;  // comparators per sensing circuit
  localparam int unsigned Q_W      = 4;   // width of a quantised read
  localparam int unsigned ANALOG_W = 8;   // width of the cell read-value code
  localparam int unsigned BM1_W    = 4;   // 1-D subset metric
  localparam int unsigned BM2_W    = 5;   // 2-D subset metric
  localparam int unsigned BM_W     = 6;   // 4-D branch metric
  localparam int unsigned PM_W     = 12;  // Viterbi path metric (saturating)

  typedef logic [1:0]          level_t;   // stored level {h,p}: value 0..3
  typedef logic [Q_W-1:0]      qread_t;   // quantised read 0..11
  typedef logic [ANALOG_W-1:0] analog_t;  // cell read value code
  typedef logic [BM1_W-1:0]    bm1_t;
  typedef logic [BM2_W-1:0]    bm2_t;
  typedef logic [BM_W-1:0]     bm_t;
  typedef logic [PM_W-1:0]     pm_t;
  typedef logic [UNC_W-1:0]    unc_t;
  typedef logic [N_IN-1:0]     step_bits_t;
  typedef bm_t  [N_SUBSET-1:0] bm_vec_t;   // branch metric per 4-D subset
  typedef unc_t [N_SUBSET-1:0] dec_vec_t;  // uncoded-bit decision per subset
  typedef pm_t  [N_STATES-1:0] pm_vec_t;

  localparam pm_t PM_INF = '1;

  typedef enum logic [1:0] {STEP_4D = 2'd0, STEP_3D = 2'd1, STEP_2D = 2'd2} step_kind_e;

  // ---- cell model used for the read metrics --------------------------------
  // Read-value code of the four level means, their standard deviations
  // (outer ones 4x and 2x the inner one) and 2*ln(sd/sd_inner) rounded.
  localparam int LEVEL_MU  [4] = '{24, 120, 162, 224};
  localparam int LEVEL_SD  [4] = '{32, 8, 8, 16};
  localparam int LEVEL_LOG [4] = '{3, 0, 0, 1};
  // The eleven reference-cell read values, ascending.
  localparam int SENSE_REF [N_REFS] = '{70, 88, 100, 110, 131, 141, 151, 172, 183, 194, 212};

  // ---- word structure --------------------------------------------------
  function automatic int num_steps(int n);
    int t = n + MEM;
    return (t % N_IN == 0) ? t / N_IN : t / N_IN + 1;
  endfunction

  // steps that go through the convolutional code
  function automatic int num_coded(int n);
    int t = n + MEM;
    return (t % N_IN == 4) ? t / N_IN : num_steps(n);
  endfunction

  function automatic step_kind_e step_kind(int n, int s);
    int t = n + MEM;
    if (s < t / N_IN) return STEP_4D;
    return (t % N_IN == 5) ? STEP_3D : STEP_2D;
  endfunction

  function automatic int step_cells(step_kind_e k);
    return (k == STEP_4D) ? 4 : (k == STEP_3D) ? 3 : 2;
  endfunction

  function automatic int num_cells(int n);
    int c = 0;
    for (int s = 0; s < num_steps(n); s++) c += step_cells(step_kind(n, s));
    return c;
  endfunction

  // supported word sizes: the remainder must be 0, 4 or 5
  function automatic bit word_size_ok(int n);
    int r = (n + MEM) % N_IN;
    return (n > 0) && (r == 0 || r == 4 || r == 5) && num_coded(n) >= 2;
  endfunction

  // Does bit b of step s carry user data? Bit 0 is x1, bit 1 is x2, the rest
  // are uncoded. Termination forces x2 to 0 in the last two coded steps and
  // x1 to 0 in the last one (3 zero bits).
  function automatic bit is_data(int n, int s, int b);
    step_kind_e k = step_kind(n, s);
    int nc = num_coded(n);
    if (k == STEP_2D) return b < 4;
    if (b >= ((k == STEP_3D) ? 5 : 7)) return 1'b0;
    if (b == 0 && s == nc - 1) return 1'b0;
    if (b == 1 && s >= nc - 2) return 1'b0;
    return 1'b1;
  endfunction

  // x1 / x2 allowed to be 1 in step s (termination pruning in the decoder)
  function automatic bit x1_free(int n, int s);
    return s < num_coded(n) - 1;
  endfunction
  function automatic bit x2_free(int n, int s);
    return s < num_coded(n) - 2;
  endfunction

  // ---- convolutional code --------------------------------------------------
  // State {x2[t-2], x2[t-1], x1[t-1]} = {c, b, a}. z0 depends on the state
  // only, so the four branches leaving a state share the top partition level.
  // With this labelling the code's squared free distance is 4 (in units of
  // the level spacing), the bound set by the parallel transitions.
  function automatic logic [2:0] conv_out(logic [2:0] st, logic [1:0] x);
    logic a, b, c;
    {c, b, a} = st;
    return {x[1] ^ a ^ c, x[0] ^ a, b};   // {z2, z1, z0}
  endfunction

  // ---- set partitioning ----------------------------------------------------
  // Cell parities (p1..p4) of subset z for the coset choice u. The other
  // coset of the subset flips all four parities.
  function automatic logic [3:0] subset_parity(logic [2:0] z, logic u);
    return {u ^ z[0] ^ z[1] ^ z[2], u ^ z[2], u ^ z[1], u};   // {p4,p3,p2,p1}
  endfunction

  // ---- read metric -----------------------------------------------------------
  function automatic int q_rep(int q);
    if (q <= 0) return SENSE_REF[0] - 16;
    if (q >= N_REFS) return SENSE_REF[N_REFS-1] + 16;
    return (SENSE_REF[q-1] + SENSE_REF[q]) / 2;
  endfunction

  // -log likelihood of a quantised read q for stored level lv, in half-nats:
  // (d/sd)^2 + 2 ln(sd/sd_inner), rounded and saturated to 4 bits.
  function automatic bm1_t cell_metric(qread_t q, level_t lv);
    int d, s2, m;
    d  = q_rep(int'(q)) - LEVEL_MU[lv];
    s2 = LEVEL_SD[lv] * LEVEL_SD[lv];
    m  = (d * d + s2 / 2) / s2 + LEVEL_LOG[lv];
    return (m > 15) ? bm1_t'(15) : bm1_t'(m);
  endfunction

endpackage
