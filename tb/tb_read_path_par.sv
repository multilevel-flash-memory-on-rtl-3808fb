// tb_read_path_par: the parallel 16-bit read path. Words are encoded by the
// reference encoder, their cells get read values around the level means with
// random noise (sum-of-uniforms, per-level spread), and the decoded word must
// be a maximum-likelihood word: its summed cell metric equals the minimum over
// all codewords (reference trellis search). Noise-free words must decode to
// the written data, and so must words with one cell pushed past the midpoint
// towards a neighbouring level unless another codeword has exactly the same
// metric (the 4-bit cell metrics saturate, so ties occur). valid_o must follow start_i by one cycle.
module tb_read_path_par;
  import tcm_pkg::*;
  import tcm_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  analog_t cells [11];
  logic valid;
  logic [15:0] data;
  int checks = 0, failures = 0;
  int corrected = 0;

  read_path_par dut (.clk, .rst_n, .start_i(start), .cells_i(cells), .valid_o(valid), .data_o(data));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // approximately normal, in units of 1/100 standard deviation
  function automatic int gauss100();
    int g = 0;
    for (int i = 0; i < 12; i++) g += $urandom_range(0, 1000);
    return (g - 6000) / 10;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      automatic logic [63:0] d = 64'({$urandom} & 32'hffff);
      automatic int mode = t % 3;       // 0 clean, 1 one pushed cell, 2 random noise
      automatic int bad = $urandom_range(0, 10);
      automatic int noise = 50 + (t % 5) * 30;  // noise spread in % of the level sd
      cells_t cl;
      qs_t q;
      r_encode(16, d, cl);
      for (int i = 0; i < 11; i++) begin
        automatic int off = 0;
        if (mode == 2) off = gauss100() * R_SD[cl[i]] * noise / 10000;
        if (mode == 1 && i == bad) begin
          // 55% of the way to the neighbouring level: the hard decision is wrong
          automatic int nb = (cl[i] == 3) ? 2 : (cl[i] == 0) ? 1 : (($urandom_range(0, 1) == 1) ? cl[i] + 1 : cl[i] - 1);
          off = (R_MU[nb] - R_MU[cl[i]]) * 55 / 100;
        end
        cells[i] = 8'(r_analog(cl[i], off));
        q[i] = r_q(int'(cells[i]));
      end
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      checks++;
      if (!valid) begin failures++; $display("FAIL latency"); end
      checks++;
      if (r_word_metric(16, 64'(data), q) != r_ml_metric(16, q)) begin
        failures++;
        $display("FAIL t=%0d not ML: %0d vs %0d", t, r_word_metric(16, 64'(data), q), r_ml_metric(16, q));
      end
      // a clean word must come back; with one pushed cell the written word
      // must come back unless another codeword ties with it (saturated metrics)
      if (mode != 2) begin
        checks++;
        if (data == d[15:0]) begin
          if (mode == 1) corrected++;
        end else if (mode == 0 || r_word_metric(16, d, q) != r_word_metric(16, 64'(data), q)) begin
          failures++;
          $display("FAIL t=%0d mode %0d data %h exp %h", t, mode, data, d[15:0]);
        end
      end
    end
    $display("single-cell errors corrected: %0d", corrected);
    checks++;
    if (corrected < 100) begin failures++; $display("FAIL too few corrections"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
