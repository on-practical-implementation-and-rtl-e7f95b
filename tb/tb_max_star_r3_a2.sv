// tb_max_star_r3_a2: exhaustive test of the r = 3 unit max{x*, 0.5(x1 + x2 + 1)} over all pairs of 8-bit operands,
// against a real-arithmetic model on the 2**-3 grid, plus an accuracy check
// against the exact log(e^x1 + e^x2) (tolerance 0.4) away from saturation.
module tb_max_star_r3_a2;
  import tb_ref_pkg::*;

  logic signed [7:0] x1, x2, z;
  int checks = 0, failures = 0;

  max_star_r3_a2 dut (.x1(x1), .x2(x2), .z(z));

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = -128; a < 128; a++) begin
      for (int b = -128; b < 128; b++) begin
        int  exp_z;
        real e;
        x1 = 8'(a); x2 = 8'(b);
        #1;
        exp_z = r3_maxstar(a, b);
        checks++;
        if (int'(z) != exp_z) begin
          failures++;
          if (failures < 10) $display("FAIL x1=%0d x2=%0d z=%0d exp=%0d", a, b, z, exp_z);
        end
        if (a < 110 && b < 110) begin
          e = lse(a / 8.0, b / 8.0) - real'(int'(z)) / 8.0;
          checks++;
          if (e > 0.4 || e < -0.4) begin
            failures++;
            if (failures < 10) $display("FAIL accuracy x1=%0d x2=%0d err=%f", a, b, e);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
