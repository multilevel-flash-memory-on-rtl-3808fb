// tb_demod_1d: for every 12-level read, checks the two 1-D subset metrics and
// decisions against the reference metric (lower level wins ties).
module tb_demod_1d;
  import tcm_pkg::*;
  import tcm_ref_pkg::*;
  qread_t q;
  bm1_t   m [2];
  logic   h [2];
  int checks = 0, failures = 0;

  demod_1d dut (.q_i(q), .metric_o(m), .h_o(h));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 12; x++) begin
      q = 4'(x);
      #1;
      for (int p = 0; p < 2; p++) begin
        automatic int lo = r_metric(x, p), hi = r_metric(x, p + 2);
        automatic int em = (hi < lo) ? hi : lo;
        checks++;
        if (int'(m[p]) != em || h[p] != (hi < lo)) begin
          failures++;
          $display("FAIL q=%0d p=%0d m=%0d/%0d h=%0d", x, p, m[p], em, h[p]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
