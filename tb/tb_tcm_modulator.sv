// tb_tcm_modulator: checks the signal mapper. 4-D: all 8 x 32 inputs against
// the reference mapper, and the set-partitioning properties: the 256 points
// are all distinct, and two points of one subset are at squared distance >= 4.
// 3-D and 2-D forms are compared with the reference for all inputs.
module tb_tcm_modulator;
  import tcm_pkg::*;
  import tcm_ref_pkg::*;
  step_kind_e kind;
  logic [2:0] z;
  unc_t       unc;
  level_t     cl [4];
  int checks = 0, failures = 0;

  tcm_modulator dut (.kind_i(kind), .z_i(z), .unc_i(unc), .cell_o(cl));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: the modulator output for step bits {unc, x2, x1} whose coded
  // bits give z is found by running the reference step from a state and input
  // that produce this z
  function automatic void ref_cells(int k, int zz, int uu, output int lv [4]);
    for (int s = 0; s < 8; s++)
      for (int x = 0; x < 4; x++) begin
        bit a = s[0], b = s[1], c = s[2], z0, z1, z2;
        bit a2 = s[0], b2 = s[1], c2 = s[2];
        r_conv(x[0], x[1], a, b, c, z0, z1, z2);
        if ({z2, z1, z0} == 3'(zz)) begin
          r_enc_step(k, {5'(uu), 2'(x)}, a2, b2, c2, lv);
          return;
        end
      end
  endfunction

  initial begin
    int pts [256][4];
    int sub [256];
    int lv [4];
    automatic int n = 0;
    kind = STEP_4D;
    for (int zz = 0; zz < 8; zz++)
      for (int uu = 0; uu < 32; uu++) begin
        z = 3'(zz); unc = 5'(uu);
        #1;
        ref_cells(4, zz, uu, lv);
        checks++;
        if (int'(cl[0]) != lv[0] || int'(cl[1]) != lv[1] || int'(cl[2]) != lv[2] || int'(cl[3]) != lv[3]) begin
          failures++;
          $display("FAIL 4D z=%0d unc=%0d", zz, uu);
        end
        for (int i = 0; i < 4; i++) pts[n][i] = int'(cl[i]);
        sub[n] = zz;
        n++;
      end
    for (int i = 0; i < 256; i++)
      for (int j = i + 1; j < 256; j++) begin
        automatic int d = 0;
        for (int c = 0; c < 4; c++) d += (pts[i][c] - pts[j][c]) * (pts[i][c] - pts[j][c]);
        if (d == 0 || (sub[i] == sub[j] && d < 4)) begin
          failures++;
          $display("FAIL partition: points %0d and %0d at distance %0d", i, j, d);
        end
      end
    checks++;
    kind = STEP_3D;
    #1;
    for (int zz = 0; zz < 8; zz++)
      for (int uu = 0; uu < 8; uu++) begin
        z = 3'(zz); unc = 5'(uu);
        #1;
        ref_cells(3, zz, uu, lv);
        checks++;
        if (int'(cl[0]) != lv[0] || int'(cl[1]) != lv[1] || int'(cl[2]) != lv[2] || cl[3] != 0) begin
          failures++;
          $display("FAIL 3D z=%0d unc=%0d got %0d %0d %0d %0d exp %0d %0d %0d k=%0d", zz, uu, cl[0], cl[1], cl[2], cl[3], lv[0], lv[1], lv[2], dut.kind_i);
        end
      end
    kind = STEP_2D;
    #1;
    for (int uu = 0; uu < 16; uu++) begin
      z = 3'($urandom); unc = 5'(uu);
      #1;
      checks++;
      if (int'(cl[0]) != uu % 4 || int'(cl[1]) != uu / 4 || cl[2] != 0) begin
        failures++;
        $display("FAIL 2D unc=%0d", uu);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
