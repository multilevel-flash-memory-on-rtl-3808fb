// tb_tcm_demod_4d: random 12-level reads of four cells. For each of the 8
// subsets the reference searches all 256 cell-level combinations, keeps those
// whose parities belong to the subset and takes the smallest summed cell
// metric; the DUT's branch metric must equal it and its decision must name a
// point of the subset with that metric. The 2-D decision must be a closest
// point of the 16-point constellation of cells 1-2.
module tb_tcm_demod_4d;
  import tcm_pkg::*;
  import tcm_ref_pkg::*;
  qread_t     q [4];
  bm_vec_t    bm;
  dec_vec_t   dec;
  logic [3:0] pt;
  int checks = 0, failures = 0;

  tcm_demod_4d dut (.q_i(q), .bm_o(bm), .dec_o(dec), .pt2d_o(pt));

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
    for (int t = 0; t < 400; t++) begin
      automatic int best [8] = '{default: 1000};
      automatic int best2 = 1000;
      for (int i = 0; i < 4; i++) q[i] = 4'($urandom_range(0, 11));
      #1;
      for (int pnt = 0; pnt < 256; pnt++) begin
        automatic int l [4];
        automatic int m = 0;
        for (int i = 0; i < 4; i++) begin l[i] = (pnt >> (2 * i)) & 3; m += r_metric(int'(q[i]), l[i]); end
        if (m < best[label(l[0] % 2, l[1] % 2, l[2] % 2, l[3] % 2)])
          best[label(l[0] % 2, l[1] % 2, l[2] % 2, l[3] % 2)] = m;
        if (pnt < 16 && r_metric(int'(q[0]), l[0]) + r_metric(int'(q[1]), l[1]) < best2)
          best2 = r_metric(int'(q[0]), l[0]) + r_metric(int'(q[1]), l[1]);
      end
      for (int z = 0; z < 8; z++) begin
        automatic int u = int'(dec[z][0]);
        automatic int p1 = u, p2 = u ^ ((z >> 1) & 1), p3 = u ^ (z >> 2), p4 = u ^ (z & 1) ^ ((z >> 1) & 1) ^ (z >> 2);
        automatic int m = r_metric(int'(q[0]), p1 + 2 * dec[z][1]) + r_metric(int'(q[1]), p2 + 2 * dec[z][2]) +
                          r_metric(int'(q[2]), p3 + 2 * dec[z][3]) + r_metric(int'(q[3]), p4 + 2 * dec[z][4]);
        checks++;
        if (int'(bm[z]) != best[z] || m != best[z]) begin
          failures++;
          $display("FAIL t=%0d z=%0d bm=%0d dec-metric=%0d exp %0d", t, z, bm[z], m, best[z]);
        end
      end
      checks++;
      if (r_metric(int'(q[0]), int'(pt[1:0])) + r_metric(int'(q[1]), int'(pt[3:2])) != best2) begin
        failures++;
        $display("FAIL t=%0d 2-D decision", t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
