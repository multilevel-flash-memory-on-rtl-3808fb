// tb_demod_2d: random 1-D metrics and decisions; checks each 2-D subset metric
// is the sum for its parity pair and the decision carries the right bits.
module tb_demod_2d;
  import tcm_pkg::*;
  bm1_t       ma [2], mb [2];
  logic       ha [2], hb [2];
  bm2_t       m [4];
  logic [1:0] d [4];
  int checks = 0, failures = 0;

  demod_2d dut (.ma_i(ma), .ha_i(ha), .mb_i(mb), .hb_i(hb), .metric_o(m), .dec_o(d));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < 2; i++) begin
        ma[i] = 4'($urandom); mb[i] = 4'($urandom); ha[i] = 1'($urandom); hb[i] = 1'($urandom);
      end
      #1;
      for (int pa = 0; pa < 2; pa++)
        for (int pb = 0; pb < 2; pb++) begin
          automatic int j = 2 * pb + pa;
          checks++;
          if (int'(m[j]) != int'(ma[pa]) + int'(mb[pb]) || d[j] != {hb[pb], ha[pa]}) begin
            failures++;
            $display("FAIL j=%0d", j);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
