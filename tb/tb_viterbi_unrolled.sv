// tb_viterbi_unrolled: random branch metrics and decisions for the 3 steps of
// the 16-bit word format. The decoded frame must be a terminated path (the
// 8 admissible paths are enumerated by the reference) whose uncoded bits are
// the decisions on its branches and whose metric is the smallest of the 8.
module tb_viterbi_unrolled;
  import tcm_pkg::*;
  import tcm_ref_pkg::*;
  bm_vec_t     bm   [3];
  dec_vec_t    dec  [3];
  logic [3:0]  pt   [3];
  logic [20:0] frame;
  int checks = 0, failures = 0;

  viterbi_unrolled dut (.bm_i(bm), .dec_i(dec), .pt2d_i(pt), .frame_o(frame));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // metric of the path with step-0 input x0 (2 bits) and step-1 x1 bit
  function automatic int path_metric(int x0, int x11, output int zs [3]);
    bit a = 0, b = 0, c = 0, z0, z1, z2;
    int m;
    r_conv(x0[0], x0[1], a, b, c, z0, z1, z2); zs[0] = int'({z2, z1, z0});
    r_conv(x11[0], 1'b0, a, b, c, z0, z1, z2); zs[1] = int'({z2, z1, z0});
    r_conv(1'b0, 1'b0, a, b, c, z0, z1, z2);   zs[2] = int'({z2, z1, z0});
    m = 0;
    for (int s = 0; s < 3; s++) m += int'(bm[s][zs[s]]);
    return m;
  endfunction

  initial begin
    for (int t = 0; t < 2000; t++) begin
      automatic int best = 99999;
      automatic int zs [3];
      automatic int m;
      for (int s = 0; s < 3; s++) begin
        for (int z = 0; z < 8; z++) begin
          bm[s][z]  = (t % 4 == 0) ? 6'($urandom_range(0, 3)) : 6'($urandom_range(0, 60));
          dec[s][z] = 5'($urandom);
        end
        pt[s] = 4'($urandom);
      end
      #1;
      for (int x0 = 0; x0 < 4; x0++)
        for (int x11 = 0; x11 < 2; x11++) begin
          m = path_metric(x0, x11, zs);
          if (m < best) best = m;
        end
      m = path_metric(int'(frame[1:0]), int'(frame[7]), zs);
      checks++;
      if (frame[8] || frame[15:14] != 2'b00 || m != best ||
          frame[6:2] != dec[0][zs[0]] || frame[13:9] != dec[1][zs[1]] || frame[18:16] != dec[2][zs[2]][2:0]) begin
        failures++;
        $display("FAIL t=%0d frame=%h metric %0d best %0d", t, frame, m, best);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
