// tb_read_path_seq: the step-serial read path for 64-bit words (default) and
// 32-bit words. Words are encoded by the reference encoder and read back with
// clean, single-pushed-cell or noisy read values. Checks: valid_o exactly
// NSTEP+2 cycles after the start cycle (12 and 7), busy_o while reading, a
// start during a read is ignored, the decoded word is maximum-likelihood
// (its summed cell metric equals the reference trellis-search minimum),
// clean words come back unchanged, and pushed-cell words come back unless
// another codeword ties. Pushed cells are put in coded steps only.
module tb_read_path_seq;
  import tcm_pkg::*;
  import tcm_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  analog_t c64 [38];
  analog_t c32 [20];
  logic b64, b32, v64, v32;
  logic [63:0] d64;
  logic [31:0] d32;
  int checks = 0, failures = 0;
  int corrected [2] = '{0, 0};

  read_path_seq                   dut64 (.clk, .rst_n, .start_i(start), .cells_i(c64), .busy_o(b64), .valid_o(v64), .data_o(d64));
  read_path_seq #(.DATA_BITS(32)) dut32 (.clk, .rst_n, .start_i(start), .cells_i(c32), .busy_o(b32), .valid_o(v32), .data_o(d32));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int gauss100();
    int g = 0;
    for (int i = 0; i < 12; i++) g += $urandom_range(0, 1000);
    return (g - 6000) / 10;
  endfunction

  function automatic int push(int lv);
    int nb = (lv == 3) ? 2 : (lv == 0) ? 1 : (($urandom_range(0, 1) == 1) ? lv + 1 : lv - 1);
    return (R_MU[nb] - R_MU[lv]) * 55 / 100;
  endfunction

  // make read values for word d of size n; returns quantised reads in q
  task automatic make_word(int n, logic [63:0] d, int mode, output cells_t cl, output qs_t q, output int vals [38]);
    // the pushed cell is in a coded step: the 2-D bypass cells of the 64-bit
    // format are uncoded and an error there cannot be corrected
    int bad = $urandom_range(0, (n == 64) ? 35 : r_ncells(n) - 1);
    r_encode(n, d, cl);
    for (int i = 0; i < r_ncells(n); i++) begin
      int off = 0;
      if (mode == 2) off = gauss100() * R_SD[cl[i]] * (50 + 30 * $urandom_range(0, 4)) / 10000;
      if (mode == 1 && i == bad) off = push(cl[i]);
      vals[i] = r_analog(cl[i], off);
      q[i] = r_q(vals[i]);
    end
  endtask

  task automatic check(int n, logic [63:0] d, logic [63:0] got, int mode, qs_t q, int idx);
    logic [63:0] m = (n == 64) ? '1 : 64'hffff_ffff;
    checks++;
    if (r_word_metric(n, got, q) != r_ml_metric(n, q)) begin
      failures++;
      $display("FAIL n=%0d not ML: %0d vs %0d", n, r_word_metric(n, got, q), r_ml_metric(n, q));
    end
    if (mode != 2) begin
      checks++;
      if ((got & m) == (d & m)) begin
        if (mode == 1) corrected[idx]++;
      end else if (mode == 0 || r_word_metric(n, d, q) != r_word_metric(n, got, q)) begin
        failures++;
        $display("FAIL n=%0d mode %0d data %h exp %h", n, mode, got, d & m);
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      automatic logic [63:0] d = {$urandom, $urandom};
      automatic logic [63:0] e = {32'd0, $urandom};
      automatic int mode = t % 3;
      automatic int cyc = 0, lat64 = -1, lat32 = -1;
      cells_t cl;
      qs_t q64, q32;
      int vals [38];
      make_word(64, d, mode, cl, q64, vals);
      for (int i = 0; i < 38; i++) c64[i] = 8'(vals[i]);
      make_word(32, e, mode, cl, q32, vals);
      for (int i = 0; i < 20; i++) c32[i] = 8'(vals[i]);
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = (t % 2 == 1);   // a second start while busy must be ignored
      cyc = 1;
      while (lat64 < 0 && cyc < 40) begin
        if (cyc == 2) start = 0;
        if (v32) begin
          lat32 = cyc;
          check(32, e, 64'(d32), mode, q32, 1);
        end
        if (v64) begin
          lat64 = cyc;
          check(64, d, d64, mode, q64, 0);
        end
        checks++;
        if (!b64) begin failures++; $display("FAIL busy low during read"); end
        @(negedge clk);
        cyc++;
      end
      checks += 3;
      if (lat64 != 12) begin failures++; $display("FAIL 64-bit latency %0d", lat64); end
      if (lat32 != 7)  begin failures++; $display("FAIL 32-bit latency %0d", lat32); end
      if (b64 || v64 || v32) begin failures++; $display("FAIL busy/valid after the read"); end
    end
    $display("single-cell errors corrected: 64-bit %0d, 32-bit %0d", corrected[0], corrected[1]);
    checks++;
    if (corrected[0] < 50 || corrected[1] < 50) begin failures++; $display("FAIL too few corrections"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
