// tb_viterbi_rx: drives the step-serial Viterbi decoder (64-bit word format,
// and a 32-bit instance) with random branch metrics and decisions, sometimes
// with idle cycles between steps. Checks for every word:
//  - done_o comes exactly one cycle after the last step;
//  - the decoded frame is a valid terminated trellis path from state 0 that
//    respects the termination zeros;
//  - its uncoded bits are the decisions of the branches it takes, and the
//    bypass step carries the 2-D decision;
//  - its total branch metric equals the minimum found by an independent
//    dynamic-programming search over the trellis.
module tb_viterbi_rx;
  import tcm_pkg::*;
  import tcm_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start, in_valid;
  bm_vec_t bm;
  dec_vec_t dec;
  logic [3:0] pt;
  logic done64, done32;
  logic [69:0] frame64;
  logic [34:0] frame32;
  int checks = 0, failures = 0;

  viterbi_rx                   dut64 (.clk, .rst_n, .start_i(start), .in_valid_i(in_valid), .bm_i(bm),
                                      .dec_i(dec), .pt2d_i(pt), .done_o(done64), .frame_o(frame64));
  viterbi_rx #(.DATA_BITS(32)) dut32 (.clk, .rst_n, .start_i(start), .in_valid_i(in_valid), .bm_i(bm),
                                      .dec_i(dec), .pt2d_i(pt), .done_o(done32), .frame_o(frame32));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int   sbm  [10][8];
  int   sdec [10][8];
  int   spt  [10];

  // minimum metric of a terminated path (reference search)
  function automatic int ref_min(int n);
    int pm [8], nx [8];
    pm = '{0, 99999, 99999, 99999, 99999, 99999, 99999, 99999};
    for (int s = 0; s < r_nsteps(n); s++) begin
      if (r_kind(n, s) == 2) continue;
      nx = '{default: 99999};
      for (int st = 0; st < 8; st++)
        for (int x = 0; x < 4; x++) begin
          bit a = st[0], b = st[1], c = st[2], z0, z1, z2;
          if ((x % 2 == 1 && !r_isdata(n, s, 0)) || (x / 2 == 1 && !r_isdata(n, s, 1))) continue;
          r_conv(x[0], x[1], a, b, c, z0, z1, z2);
          if (pm[st] + sbm[s][{z2, z1, z0}] < nx[{c, b, a}]) nx[{c, b, a}] = pm[st] + sbm[s][{z2, z1, z0}];
        end
      pm = nx;
    end
    return pm[0];
  endfunction

  task automatic check_frame(int n, logic [69:0] f);
    bit a = 0, b = 0, c = 0, z0, z1, z2;
    int m = 0;
    bit ok = 1;
    for (int s = 0; s < r_nsteps(n); s++) begin
      if (r_kind(n, s) == 2) begin
        if (f[7*s +: 7] != 7'(spt[s])) ok = 0;
        continue;
      end
      for (int k = 0; k < 2; k++) if (f[7*s+k] && !r_isdata(n, s, k)) ok = 0;
      r_conv(f[7*s], f[7*s+1], a, b, c, z0, z1, z2);
      m += sbm[s][{z2, z1, z0}];
      if (r_kind(n, s) == 4 && f[7*s+2 +: 5] != 5'(sdec[s][{z2, z1, z0}])) ok = 0;
      if (r_kind(n, s) == 3 && f[7*s+2 +: 3] != 3'(sdec[s][{z2, z1, z0}])) ok = 0;
    end
    if ({c, b, a} != 3'd0) ok = 0;
    checks++;
    if (!ok || m != ref_min(n)) begin
      failures++;
      $display("FAIL n=%0d path ok=%0d metric %0d, minimum %0d", n, ok, m, ref_min(n));
    end
  endtask

  initial begin
    start = 0; in_valid = 0; bm = '0; dec = '0; pt = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < 300; w++) begin
      automatic int gaps = w % 3;
      for (int s = 0; s < 10; s++) begin
        for (int z = 0; z < 8; z++) begin
          // small metrics in some words make ties frequent
          sbm[s][z]  = (w % 4 == 0) ? $urandom_range(0, 3) : $urandom_range(0, 60);
          sdec[s][z] = $urandom_range(0, 31);
        end
        spt[s] = $urandom_range(0, 15);
      end
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      for (int s = 0; s < 10; s++) begin
        if (gaps != 0 && $urandom_range(0, 1) == 1) @(negedge clk);
        for (int z = 0; z < 8; z++) begin bm[z] = 6'(sbm[s][z]); dec[z] = 5'(sdec[s][z]); end
        pt = 4'(spt[s]);
        in_valid = 1;
        @(negedge clk);
        in_valid = 0;
        // 32-bit instance sees its last (5th) step at s == 4
        if (s == 4) begin
          checks++;
          if (!done32) begin failures++; $display("FAIL 32-bit done latency"); end
          else check_frame(32, 70'(frame32));
        end else if (done32) begin
          failures++; $display("FAIL 32-bit early/extra done at step %0d", s);
        end
      end
      checks++;
      if (!done64) begin failures++; $display("FAIL 64-bit done latency"); end
      else check_frame(64, frame64);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
