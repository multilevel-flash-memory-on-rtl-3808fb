// tb_conv_encoder: exhaustive check of the convolutional encoder step against
// the bit-level reference encoder (all 8 states x 4 inputs), plus a check that
// three termination zeros (x2, then x1 and x2) return any state to 0.
module tb_conv_encoder;
  import tcm_ref_pkg::*;
  logic [2:0] st, z, nx;
  logic [1:0] x;
  int checks = 0, failures = 0;

  conv_encoder dut (.state_i(st), .x_i(x), .z_o(z), .state_o(nx));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 8; s++)
      for (int i = 0; i < 4; i++) begin
        bit a, b, c, z0, z1, z2;
        st = 3'(s); x = 2'(i);
        #1;
        a = s[0]; b = s[1]; c = s[2];
        r_conv(i[0], i[1], a, b, c, z0, z1, z2);
        checks++;
        if (z !== {z2, z1, z0} || nx !== {c, b, a}) begin
          failures++;
          $display("FAIL st=%0d x=%0d z=%b/%b next=%b/%b", s, i, z, {z2, z1, z0}, nx, {c, b, a});
        end
      end
    // termination: {x2=0,x1=any} then {0,0} reaches state 0 from anywhere
    for (int s = 0; s < 8; s++)
      for (int x1 = 0; x1 < 2; x1++) begin
        st = 3'(s); x = {1'b0, 1'(x1)};
        #1;
        st = nx; x = 2'b00;
        #1;
        checks++;
        if (nx !== 3'd0) begin
          failures++;
          $display("FAIL termination from state %0d", s);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
