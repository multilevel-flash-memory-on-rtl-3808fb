// tb_demod_4d: random 2-D metrics; for each 4-D subset the reference tries all
// 16 2-D pairs, keeps those whose four parities belong to the subset (both
// cosets), and the DUT must return their minimum and a decision that points at
// a pair achieving it.
module tb_demod_4d;
  import tcm_pkg::*;
  bm2_t       ma [4], mb [4];
  logic [1:0] da [4], db [4];
  bm_vec_t    bm;
  dec_vec_t   dec;
  int checks = 0, failures = 0;

  demod_4d dut (.ma_i(ma), .da_i(da), .mb_i(mb), .db_i(db), .bm_o(bm), .dec_o(dec));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // subset label of a 4-cell parity pattern: z0 = p1^p2^p3^p4 ... solved from
  // p1=u, p2=u^z1, p3=u^z2, p4=u^z0^z1^z2
  function automatic int label(int qa, int qb);
    int p1 = qa % 2, p2 = qa / 2, p3 = qb % 2, p4 = qb / 2;
    int z1 = p1 ^ p2, z2 = p1 ^ p3, z0 = p1 ^ p4 ^ z1 ^ z2;
    return 4 * z2 + 2 * z1 + z0;
  endfunction

  initial begin
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < 4; i++) begin
        ma[i] = 5'($urandom_range(0, 30)); mb[i] = 5'($urandom_range(0, 30));
        da[i] = 2'($urandom); db[i] = 2'($urandom);
      end
      #1;
      for (int z = 0; z < 8; z++) begin
        automatic int best = 1000;
        int qa, qb, u;
        for (int a = 0; a < 4; a++)
          for (int b = 0; b < 4; b++)
            if (label(a, b) == z && int'(ma[a]) + int'(mb[b]) < best) best = int'(ma[a]) + int'(mb[b]);
        u  = int'(dec[z][0]);
        // pair selected by the decision's coset bit
        qa = 2 * (u ^ (z / 2 % 2)) + u;
        qb = 2 * (u ^ (z % 2) ^ (z / 2 % 2) ^ (z / 4)) + (u ^ (z / 4));
        checks++;
        if (int'(bm[z]) != best || int'(ma[qa]) + int'(mb[qb]) != best ||
            dec[z][2:1] != da[qa] || dec[z][4:3] != db[qb]) begin
          failures++;
          $display("FAIL t=%0d z=%0d bm=%0d exp %0d", t, z, bm[z], best);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
