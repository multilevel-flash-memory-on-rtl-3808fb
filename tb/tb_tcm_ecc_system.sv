// tb_tcm_ecc_system: one system at its default size (64-bit words, serial
// read path) and one with 16-bit words (parallel read path): write a word,
// turn the programmed levels into read values (clean or with one coded cell
// pushed past the midpoint towards a neighbour), read it back and compare.
// Checks the programmed levels against the reference encoder and the read
// latencies (12 cycles and 1 cycle).
module tb_tcm_ecc_system;
  import tcm_pkg::*;
  import tcm_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic wv = 0, rs = 0;
  logic [63:0] wd = '0;
  logic pv64, pv16, b64, b16, rv64, rv16;
  level_t p64 [38];
  level_t p16 [11];
  analog_t c64 [38];
  analog_t c16 [11];
  logic [63:0] d64;
  logic [15:0] d16;
  int checks = 0, failures = 0, corrected = 0;

  tcm_ecc_system                   dut64 (.clk, .rst_n, .wr_valid_i(wv), .wr_data_i(wd), .prog_valid_o(pv64), .prog_cells_o(p64),
                                          .rd_start_i(rs), .rd_cells_i(c64), .rd_busy_o(b64), .rd_valid_o(rv64), .rd_data_o(d64));
  tcm_ecc_system #(.DATA_BITS(16)) dut16 (.clk, .rst_n, .wr_valid_i(wv), .wr_data_i(wd[15:0]), .prog_valid_o(pv16), .prog_cells_o(p16),
                                          .rd_start_i(rs), .rd_cells_i(c16), .rd_busy_o(b16), .rd_valid_o(rv16), .rd_data_o(d16));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int push(int lv);
    int nb = (lv == 3) ? 2 : (lv == 0) ? 1 : lv + 1;
    return (R_MU[nb] - R_MU[lv]) * 55 / 100;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      automatic logic [63:0] d = {$urandom, $urandom};
      automatic int bad64 = (t % 2 == 1) ? $urandom_range(0, 35) : -1;
      automatic int bad16 = (t % 2 == 1) ? $urandom_range(0, 10) : -1;
      automatic int lat16 = -1, lat64 = -1;
      cells_t e64, e16;
      qs_t q64, q16;
      r_encode(64, d, e64);
      r_encode(16, d, e16);
      @(negedge clk);
      wd = d; wv = 1;
      @(negedge clk);
      wv = 0;
      checks++;
      if (!pv64 || !pv16) begin failures++; $display("FAIL prog valid"); end
      for (int i = 0; i < 38; i++) begin
        checks++;
        if (int'(p64[i]) != e64[i]) begin failures++; $display("FAIL 64 prog cell %0d", i); end
        c64[i] = 8'(r_analog(int'(p64[i]), (i == bad64) ? push(int'(p64[i])) : 0));
        q64[i] = r_q(int'(c64[i]));
      end
      for (int i = 0; i < 11; i++) begin
        checks++;
        if (int'(p16[i]) != e16[i]) begin failures++; $display("FAIL 16 prog cell %0d", i); end
        c16[i] = 8'(r_analog(int'(p16[i]), (i == bad16) ? push(int'(p16[i])) : 0));
        q16[i] = r_q(int'(c16[i]));
      end
      rs = 1;
      @(negedge clk);
      rs = 0;
      for (int c = 1; c < 20 && lat64 < 0; c++) begin
        if (rv16) begin
          lat16 = c;
          checks++;
          if (d16 != d[15:0] && (bad16 < 0 || r_word_metric(16, 64'(d16), q16) != r_word_metric(16, d, q16))) begin
            failures++; $display("FAIL 16 read %h exp %h", d16, d[15:0]);
          end else if (bad16 >= 0 && d16 == d[15:0]) corrected++;
        end
        if (rv64) begin
          lat64 = c;
          checks++;
          if (d64 != d && (bad64 < 0 || r_word_metric(64, d64, q64) != r_word_metric(64, d, q64))) begin
            failures++; $display("FAIL 64 read %h exp %h", d64, d);
          end else if (bad64 >= 0 && d64 == d) corrected++;
        end
        @(negedge clk);
      end
      checks += 2;
      if (lat16 != 1)  begin failures++; $display("FAIL 16 latency %0d", lat16); end
      if (lat64 != 12) begin failures++; $display("FAIL 64 latency %0d", lat64); end
    end
    checks++;
    if (corrected < 100) begin failures++; $display("FAIL only %0d corrections", corrected); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
