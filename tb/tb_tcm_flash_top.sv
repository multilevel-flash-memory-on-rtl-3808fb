// tb_tcm_flash_top: end-to-end test of the three TCM ECC systems at their
// full sizes (no parameter overrides). Each system is connected to a
// behavioural cell array. Words are written (encoded, and the programmed
// levels checked against the reference encoder), stored with per-cell
// read-value offsets, and read back in a different order through sensing,
// demodulation and Viterbi decoding. Read kinds: clean; one cell of a coded
// step pushed past the midpoint towards a neighbouring level (must be
// corrected unless another codeword ties); random noise (result must be a
// maximum-likelihood word); and, for 64 bits, one cell of the uncoded 2-D
// bypass step pushed well towards its neighbour (the user bits there must
// follow the per-cell hard decision, which then is usually wrong). Read
// latencies are checked: 1 cycle (16-bit, unrolled decoder), 7 (32-bit) and
// 12 (64-bit). Every mechanism must occur at least once.
module tb_tcm_flash_top;
  import tcm_pkg::*;
  import tcm_ref_pkg::*;

  localparam int WORDS = 8;

  logic clk = 0, rst_n = 0;
  logic        wr16_v = 0, wr32_v = 0, wr64_v = 0;
  logic [15:0] wr16_d = '0;
  logic [31:0] wr32_d = '0;
  logic [63:0] wr64_d = '0;
  logic        p16_v, p32_v, p64_v;
  level_t      p16 [11];
  level_t      p32 [20];
  level_t      p64 [38];
  logic        rd16_s = 0, rd32_s = 0, rd64_s = 0;
  analog_t     r16 [11];
  analog_t     r32 [20];
  analog_t     r64 [38];
  logic        b32, b64, v16, v32, v64;
  logic [15:0] d16;
  logic [31:0] d32;
  logic [63:0] d64;
  logic [2:0]  wa16 = 0, wa32 = 0, wa64 = 0, ra16 = 0, ra32 = 0, ra64 = 0;
  int          off16 [11];
  int          off32 [20];
  int          off64 [38];

  int checks = 0, failures = 0;
  // mechanism counters
  int n_clean [3], n_corrected [3], n_tie [3], n_noisy [3];
  int n_3d_corrected = 0, n_bypass_hard = 0, n_busy_ignored = 0;

  tcm_flash_top dut (
    .clk, .rst_n,
    .wr16_valid_i(wr16_v), .wr16_data_i(wr16_d), .prog16_valid_o(p16_v), .prog16_cells_o(p16),
    .rd16_start_i(rd16_s), .rd16_cells_i(r16), .rd16_valid_o(v16), .rd16_data_o(d16),
    .wr32_valid_i(wr32_v), .wr32_data_i(wr32_d), .prog32_valid_o(p32_v), .prog32_cells_o(p32),
    .rd32_start_i(rd32_s), .rd32_cells_i(r32), .rd32_busy_o(b32), .rd32_valid_o(v32), .rd32_data_o(d32),
    .wr64_valid_i(wr64_v), .wr64_data_i(wr64_d), .prog64_valid_o(p64_v), .prog64_cells_o(p64),
    .rd64_start_i(rd64_s), .rd64_cells_i(r64), .rd64_busy_o(b64), .rd64_valid_o(v64), .rd64_data_o(d64)
  );

  flash_core_model #(.NCELL(11), .WORDS(WORDS)) u_core16 (.clk, .prog_en_i(p16_v), .prog_addr_i(wa16),
    .prog_cells_i(p16), .prog_offset_i(off16), .rd_addr_i(ra16), .rd_cells_o(r16));
  flash_core_model #(.NCELL(20), .WORDS(WORDS)) u_core32 (.clk, .prog_en_i(p32_v), .prog_addr_i(wa32),
    .prog_cells_i(p32), .prog_offset_i(off32), .rd_addr_i(ra32), .rd_cells_o(r32));
  flash_core_model #(.NCELL(38), .WORDS(WORDS)) u_core64 (.clk, .prog_en_i(p64_v), .prog_addr_i(wa64),
    .prog_cells_i(p64), .prog_offset_i(off64), .rd_addr_i(ra64), .rd_cells_o(r64));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  // level with the smallest metric for each of two reads (lower level on ties)
  function automatic logic [3:0] hard_bits(int q0, int q1);
    int b0 = 0, b1 = 0;
    for (int l = 1; l < 4; l++) begin
      if (r_metric(q0, l) < r_metric(q0, b0)) b0 = l;
      if (r_metric(q1, l) < r_metric(q1, b1)) b1 = l;
    end
    return {2'(b1), 2'(b0)};
  endfunction

  function automatic int sysidx(int n);
    return (n == 16) ? 0 : (n == 32) ? 1 : 2;
  endfunction

  // what each stored word was
  logic [63:0] wdata [3][WORDS];
  int          wmode [3][WORDS];
  int          wbad  [3][WORDS];
  qs_t         wq    [3][WORDS];

  // encode word d into address a of system n with read kind mode
  task automatic write_word(int n, int a, logic [63:0] d, int mode);
    cells_t cl;
    int off [38];
    int bad;
    int x = sysidx(n);
    r_encode(n, d, cl);
    case (mode)
      1: bad = $urandom_range(0, (n == 64) ? 35 : r_ncells(n) - 1);
      3: bad = $urandom_range(36, 37);
      4: bad = $urandom_range(8, 10);          // 16-bit: a cell of the 3-D step
      default: bad = -1;
    endcase
    for (int i = 0; i < 38; i++) begin
      off[i] = 0;
      if (i < r_ncells(n)) begin
        if (mode == 2) off[i] = gauss100() * R_SD[cl[i]] * (50 + 30 * $urandom_range(0, 4)) / 10000;
        if (i == bad) off[i] = (mode == 3) ? push(cl[i]) * 15 / 10 : push(cl[i]);
        wq[x][a][i] = r_q(r_analog(cl[i], off[i]));
      end
    end
    wdata[x][a] = d; wmode[x][a] = mode; wbad[x][a] = bad;
    @(negedge clk);
    case (n)
      16: begin wr16_d = d[15:0]; wr16_v = 1; wa16 = 3'(a); for (int i = 0; i < 11; i++) off16[i] = off[i]; end
      32: begin wr32_d = d[31:0]; wr32_v = 1; wa32 = 3'(a); for (int i = 0; i < 20; i++) off32[i] = off[i]; end
      default: begin wr64_d = d; wr64_v = 1; wa64 = 3'(a); for (int i = 0; i < 38; i++) off64[i] = off[i]; end
    endcase
    @(negedge clk);
    wr16_v = 0; wr32_v = 0; wr64_v = 0;
    // programmed levels (prog valid is high now; the array stores at the next edge)
    for (int i = 0; i < r_ncells(n); i++) begin
      int got = (n == 16) ? int'(p16[i]) : (n == 32) ? int'(p32[i]) : int'(p64[i]);
      checks++;
      if (got != cl[i]) begin failures++; $display("FAIL n=%0d cell %0d programmed %0d exp %0d", n, i, got, cl[i]); end
    end
    checks++;
    if (!((n == 16) ? p16_v : (n == 32) ? p32_v : p64_v)) begin failures++; $display("FAIL n=%0d prog valid", n); end
    @(negedge clk);
  endtask

  task automatic read_word(int n, int a);
    int x = sysidx(n);
    int lat = -1;
    int explat = (n == 16) ? 1 : (n == 32) ? 7 : 12;
    logic [63:0] got, m;
    m = (n == 16) ? 64'hffff : (n == 32) ? 64'hffff_ffff : '1;
    @(negedge clk);
    case (n)
      16: begin ra16 = 3'(a); rd16_s = 1; end
      32: begin ra32 = 3'(a); rd32_s = 1; end
      default: begin ra64 = 3'(a); rd64_s = 1; end
    endcase
    @(negedge clk);
    // for 64 bits, keep start high one more cycle once in a while: ignored
    if (n == 64 && a % 3 == 0) begin
      if (b64) n_busy_ignored++;
    end else begin
      rd64_s = 0;
    end
    rd16_s = 0; rd32_s = 0;
    for (int c = 1; c < 30 && lat < 0; c++) begin
      if (c == 2) rd64_s = 0;
      if ((n == 16 && v16) || (n == 32 && v32) || (n == 64 && v64)) begin
        lat = c;
        got = (n == 16) ? 64'(d16) : (n == 32) ? 64'(d32) : d64;
      end else @(negedge clk);
    end
    checks++;
    if (lat != explat) begin failures++; $display("FAIL n=%0d latency %0d exp %0d", n, lat, explat); return; end
    checks++;
    if (r_word_metric(n, got, wq[x][a]) != r_ml_metric(n, wq[x][a])) begin
      failures++; $display("FAIL n=%0d not a maximum-likelihood word", n);
    end
    checks++;
    case (wmode[x][a])
      0: if (got == (wdata[x][a] & m)) n_clean[x]++;
         else begin failures++; $display("FAIL n=%0d clean word %h read %h", n, wdata[x][a] & m, got); end
      1, 4: if (got == (wdata[x][a] & m)) begin
              n_corrected[x]++;
              if (wmode[x][a] == 4) n_3d_corrected++;
            end else if (r_word_metric(n, got, wq[x][a]) == r_word_metric(n, wdata[x][a], wq[x][a])) n_tie[x]++;
            else begin failures++; $display("FAIL n=%0d pushed cell %0d not corrected", n, wbad[x][a]); end
      // uncoded 2-D step: its four bits are the per-cell hard decisions
      3: if (got[59:0] == wdata[x][a][59:0] && got[63:60] == hard_bits(wq[x][a][36], wq[x][a][37])) begin
           if (got[63:60] != wdata[x][a][63:60]) n_bypass_hard++;
         end else begin failures++; $display("FAIL n=64 bypass step: %h vs %h", got, wdata[x][a]); end
      default: n_noisy[x]++;
    endcase
    @(negedge clk);
  endtask

  initial begin
    n_clean = '{0, 0, 0}; n_corrected = '{0, 0, 0}; n_tie = '{0, 0, 0}; n_noisy = '{0, 0, 0};
    off16 = '{default: 0}; off32 = '{default: 0}; off64 = '{default: 0};
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < 12; round++) begin
      for (int a = 0; a < WORDS; a++) begin
        automatic int mode = (a + round) % 4;
        write_word(16, a, 64'({$urandom}), (mode == 3) ? 4 : mode);
        write_word(32, a, 64'({$urandom}), (mode == 3) ? 1 : mode);
        write_word(64, a, {$urandom, $urandom}, mode);
      end
      for (int k = 0; k < WORDS; k++) begin
        automatic int a = (k * 5 + round) % WORDS;
        read_word(16, a);
        read_word(32, a);
        read_word(64, a);
      end
    end
    $display("16-bit: clean %0d corrected %0d (3-D step %0d) tie %0d noisy %0d",
             n_clean[0], n_corrected[0], n_3d_corrected, n_tie[0], n_noisy[0]);
    $display("32-bit: clean %0d corrected %0d tie %0d noisy %0d", n_clean[1], n_corrected[1], n_tie[1], n_noisy[1]);
    $display("64-bit: clean %0d corrected %0d tie %0d noisy %0d bypass-step hard errors %0d, starts ignored while busy %0d",
             n_clean[2], n_corrected[2], n_tie[2], n_noisy[2], n_bypass_hard, n_busy_ignored);
    for (int x = 0; x < 3; x++) begin
      checks += 3;
      if (n_clean[x] == 0)     begin failures++; $display("FAIL system %0d: no clean read", x); end
      if (n_corrected[x] == 0) begin failures++; $display("FAIL system %0d: no corrected read", x); end
      if (n_noisy[x] == 0)     begin failures++; $display("FAIL system %0d: no noisy read", x); end
    end
    checks += 3;
    if (n_3d_corrected == 0) begin failures++; $display("FAIL no correction in the 3-D step"); end
    if (n_bypass_hard == 0)  begin failures++; $display("FAIL no 2-D bypass step decision"); end
    if (n_busy_ignored == 0) begin failures++; $display("FAIL no start while busy"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
