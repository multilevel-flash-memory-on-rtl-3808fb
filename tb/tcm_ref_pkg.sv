// tcm_ref_pkg: reference model used by the testbenches. It re-derives the word
// format, the TCM encoder, the 12-level quantiser, the read metric and the
// maximum-likelihood decoding cost from the code definition, written
// separately from the RTL (per-size tables instead of formulas, bit-level
// encoder history, real arithmetic for the metric, exhaustive searches), so
// that the testbenches compare the RTL against an independent model.
package tcm_ref_pkg;

  typedef int cells_t [38];
  typedef int qs_t    [38];

  localparam int R_REF [11] = '{70, 88, 100, 110, 131, 141, 151, 172, 183, 194, 212};
  localparam int R_MU  [4]  = '{24, 120, 162, 224};
  localparam int R_SD  [4]  = '{32, 8, 8, 16};

  // ---- word format, per supported size ----------------------------------
  function automatic int r_nsteps(int n);
    case (n) 16: return 3; 32: return 5; default: return 10; endcase
  endfunction
  // cells of step s (4: 4-D, 3: 3-D, 2: 2-D bypass)
  function automatic int r_kind(int n, int s);
    if (n == 16 && s == 2) return 3;
    if (n == 64 && s == 9) return 2;
    return 4;
  endfunction
  function automatic int r_ncells(int n);
    case (n) 16: return 11; 32: return 20; default: return 38; endcase
  endfunction
  function automatic bit r_isdata(int n, int s, int b);
    int lastc;                        // last coded step
    case (n) 16: lastc = 2; 32: lastc = 4; default: lastc = 8; endcase
    if (r_kind(n, s) == 2) return b < 4;
    if (r_kind(n, s) == 3 && b > 4) return 0;
    if (s == lastc && (b == 0 || b == 1)) return 0;
    if (s == lastc - 1 && b == 1) return 0;
    return 1;
  endfunction

  function automatic logic [69:0] r_frame(int n, logic [63:0] data);
    logic [69:0] f = '0;
    int j = 0;
    for (int s = 0; s < r_nsteps(n); s++)
      for (int b = 0; b < 7; b++)
        if (r_isdata(n, s, b)) begin f[7*s+b] = data[j]; j++; end
    return f;
  endfunction

  function automatic logic [63:0] r_unframe(int n, logic [69:0] f);
    logic [63:0] d = '0;
    int j = 0;
    for (int s = 0; s < r_nsteps(n); s++)
      for (int b = 0; b < 7; b++)
        if (r_isdata(n, s, b)) begin d[j] = f[7*s+b]; j++; end
    return d;
  endfunction

  // ---- encoder -----------------------------------------------------------
  // history: a = x1[t-1], b = x2[t-1], c = x2[t-2]
  function automatic void r_conv(input bit x1, input bit x2, inout bit a, inout bit b, inout bit c,
                                 output bit z0, output bit z1, output bit z2);
    z0 = b;
    z1 = x1 ^ a;
    z2 = x2 ^ a ^ c;
    c = b; b = x2; a = x1;
  endfunction

  // cells of one step; bits = the 7 step bits
  function automatic void r_enc_step(input int kind, input logic [6:0] bits,
                                     inout bit a, inout bit b, inout bit c, output int lv [4]);
    bit z0, z1, z2, u;
    bit p [4];
    lv = '{0, 0, 0, 0};
    if (kind == 2) begin
      lv[0] = bits[0] + 2 * bits[1];
      lv[1] = bits[2] + 2 * bits[3];
      return;
    end
    r_conv(bits[0], bits[1], a, b, c, z0, z1, z2);
    u = bits[2];
    p[0] = u; p[1] = u ^ z1; p[2] = u ^ z2; p[3] = u ^ z0 ^ z1 ^ z2;
    lv[0] = p[0] + 2 * bits[3];
    lv[1] = p[1] + 2 * bits[4];
    if (kind == 4) begin
      lv[2] = p[2] + 2 * bits[5];
      lv[3] = p[3] + 2 * bits[6];
    end else begin
      lv[2] = 2 * p[2] + p[3];
    end
  endfunction

  function automatic void r_encode(input int n, input logic [63:0] data, output cells_t cells);
    logic [69:0] f = r_frame(n, data);
    bit a = 0, b = 0, c = 0;
    int lv [4];
    int k = 0;
    cells = '{default: 0};
    for (int s = 0; s < r_nsteps(n); s++) begin
      r_enc_step(r_kind(n, s), f[7*s +: 7], a, b, c, lv);
      for (int i = 0; i < r_kind(n, s); i++) begin cells[k] = lv[i]; k++; end
    end
  endfunction

  // ---- read side -----------------------------------------------------------
  function automatic int r_q(int v);
    int q = 0;
    for (int i = 0; i < 11; i++) if (v >= R_REF[i]) q++;
    return q;
  endfunction

  function automatic int r_metric(int q, int lv);
    real rep, d, m;
    if (q == 0) rep = R_REF[0] - 16;
    else if (q == 11) rep = R_REF[10] + 16;
    else rep = $floor((R_REF[q-1] + R_REF[q]) / 2.0);
    d = rep - R_MU[lv];
    m = $floor(d * d / (R_SD[lv] * R_SD[lv]) + 0.5) + $floor(2.0 * $ln(R_SD[lv] / 8.0) + 0.5);
    return (m > 15.0) ? 15 : int'(m);
  endfunction

  function automatic int r_word_metric(int n, logic [63:0] data, qs_t q);
    cells_t cl;
    int m = 0;
    r_encode(n, data, cl);
    for (int i = 0; i < r_ncells(n); i++) m += r_metric(q[i], cl[i]);
    return m;
  endfunction

  // minimum word metric over all codewords (dynamic programming over the
  // 8 encoder histories, all 128 / 32 / 16 step inputs tried per state)
  function automatic int r_ml_metric(int n, qs_t q);
    int pm [8], nx [8];
    int base = 0;
    pm = '{0, 1 << 20, 1 << 20, 1 << 20, 1 << 20, 1 << 20, 1 << 20, 1 << 20};
    for (int s = 0; s < r_nsteps(n); s++) begin
      int kind = r_kind(n, s);
      nx = '{default: 1 << 20};
      for (int st = 0; st < 8; st++) begin
        if (pm[st] >= (1 << 20)) continue;
        for (int in = 0; in < 128; in++) begin
          logic [6:0] bits = 7'(in);
          bit ok = 1;
          bit a, b, c;
          int lv [4];
          int m = 0, ns;
          for (int k = 0; k < 7; k++) if (bits[k] && !r_isdata(n, s, k)) ok = 0;
          if (!ok) continue;
          a = st[0]; b = st[1]; c = st[2];
          r_enc_step(kind, bits, a, b, c, lv);
          for (int i = 0; i < kind; i++) m += r_metric(q[base+i], lv[i]);
          ns = (kind == 2) ? st : int'({c, b, a});
          if (pm[st] + m < nx[ns]) nx[ns] = pm[st] + m;
        end
      end
      pm = nx;
      base += kind;
    end
    return pm[0];
  endfunction

  // read value of a stored level with an offset, clipped to 8 bits
  function automatic int r_analog(int lv, int off);
    int v = R_MU[lv] + off;
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction

endpackage
