// tb_tcm_demod_3d: random 12-level reads of three cells. For each subset the
// reference searches all 64 3-cell points (third cell level = 2*p3 + p4 of the
// collapsed 2-D constellation) and the DUT's metric and decision must match
// the smallest summed cell metric.
module tb_tcm_demod_3d;
  import tcm_pkg::*;
  import tcm_ref_pkg::*;
  qread_t   q [3];
  bm_vec_t  bm;
  dec_vec_t dec;
  int checks = 0, failures = 0;

  tcm_demod_3d dut (.q_i(q), .bm_o(bm), .dec_o(dec));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int label(int p1, int p2, int p3, int p4);
    int z1 = p1 ^ p2, z2 = p1 ^ p3, z0 = p1 ^ p4 ^ z1 ^ z2;
    return 4 * z2 + 2 * z1 + z0;
  endfunction

  initial begin
    for (int t = 0; t < 1000; t++) begin
      automatic int best [8] = '{default: 1000};
      for (int i = 0; i < 3; i++) q[i] = 4'($urandom_range(0, 11));
      #1;
      for (int pnt = 0; pnt < 64; pnt++) begin
        automatic int l0 = pnt & 3, l1 = (pnt >> 2) & 3, l2 = pnt >> 4;
        automatic int m = r_metric(int'(q[0]), l0) + r_metric(int'(q[1]), l1) + r_metric(int'(q[2]), l2);
        automatic int z = label(l0 % 2, l1 % 2, l2 / 2, l2 % 2);
        if (m < best[z]) best[z] = m;
      end
      for (int z = 0; z < 8; z++) begin
        automatic int u = int'(dec[z][0]);
        automatic int p1 = u, p2 = u ^ ((z >> 1) & 1), p3 = u ^ (z >> 2), p4 = u ^ (z & 1) ^ ((z >> 1) & 1) ^ (z >> 2);
        automatic int m = r_metric(int'(q[0]), p1 + 2 * dec[z][1]) + r_metric(int'(q[1]), p2 + 2 * dec[z][2]) +
                          r_metric(int'(q[2]), 2 * p3 + p4);
        checks++;
        if (int'(bm[z]) != best[z] || m != best[z]) begin
          failures++;
          $display("FAIL t=%0d z=%0d bm=%0d dec-metric=%0d exp %0d", t, z, bm[z], m, best[z]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
