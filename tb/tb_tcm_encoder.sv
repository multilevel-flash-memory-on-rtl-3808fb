// tb_tcm_encoder: encodes random and corner words with the 64-bit (default),
// 32-bit and 16-bit encoders and compares every cell level with the reference
// encoder; also checks the one-cycle latency of valid_o.
module tb_tcm_encoder;
  import tcm_pkg::*;
  import tcm_ref_pkg::*;
  logic clk = 0, rst_n = 0, valid = 0;
  logic [63:0] data;
  logic v64, v32, v16;
  level_t c64 [38];
  level_t c32 [20];
  level_t c16 [11];
  int checks = 0, failures = 0;

  tcm_encoder                  dut64 (.clk, .rst_n, .valid_i(valid), .data_i(data),        .valid_o(v64), .cells_o(c64));
  tcm_encoder #(.DATA_BITS(32)) dut32 (.clk, .rst_n, .valid_i(valid), .data_i(data[31:0]), .valid_o(v32), .cells_o(c32));
  tcm_encoder #(.DATA_BITS(16)) dut16 (.clk, .rst_n, .valid_i(valid), .data_i(data[15:0]), .valid_o(v16), .cells_o(c16));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_word(logic [63:0] d);
    cells_t e;
    @(negedge clk);
    data = d; valid = 1;
    @(negedge clk);
    valid = 0;
    checks++;
    if (!(v64 && v32 && v16)) begin failures++; $display("FAIL valid latency"); end
    r_encode(64, d, e);
    for (int i = 0; i < 38; i++) begin
      checks++;
      if (int'(c64[i]) != e[i]) begin failures++; $display("FAIL 64 cell %0d: %0d vs %0d (data %h)", i, c64[i], e[i], d); end
    end
    r_encode(32, d, e);
    for (int i = 0; i < 20; i++) begin
      checks++;
      if (int'(c32[i]) != e[i]) begin failures++; $display("FAIL 32 cell %0d", i); end
    end
    r_encode(16, d, e);
    for (int i = 0; i < 11; i++) begin
      checks++;
      if (int'(c16[i]) != e[i]) begin failures++; $display("FAIL 16 cell %0d", i); end
    end
    @(negedge clk);
    checks++;
    if (v64 || v32 || v16) begin failures++; $display("FAIL valid not a pulse"); end
  endtask

  initial begin
    data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check_word('0);
    check_word('1);
    for (int i = 0; i < 64; i++) check_word(64'd1 << i);
    for (int i = 0; i < 200; i++) check_word({$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
