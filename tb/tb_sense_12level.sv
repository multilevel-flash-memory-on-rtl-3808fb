// tb_sense_12level: sweeps the cell read value over its whole range and checks
// every comparator against the reference cell values, and that the comparator
// outputs, counted, give the reference 12-level quantiser result.
module tb_sense_12level;
  import tcm_pkg::*;
  import tcm_ref_pkg::*;
  analog_t     v;
  logic [10:0] comp;
  qread_t      q;
  int checks = 0, failures = 0;

  sense_12level dut (.cell_i(v), .comp_o(comp));
  therm_to_q    u_q (.comp_i(comp), .q_o(q));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 256; x++) begin
      v = 8'(x);
      #1;
      for (int i = 0; i < 11; i++) begin
        checks++;
        if (comp[i] !== (x >= R_REF[i])) begin failures++; $display("FAIL v=%0d COMP%0d", x, i + 1); end
      end
      checks++;
      if (int'(q) != r_q(x)) begin failures++; $display("FAIL v=%0d q=%0d exp %0d", x, q, r_q(x)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
