// tb_cs_unit: exhaustive test of the compare-select unit over all pairs of
// 8-bit operands: u must be the larger operand and delta the exact p - q.
module tb_cs_unit;
  logic signed [7:0] p, q, u;
  logic signed [8:0] delta;
  int checks = 0, failures = 0;

  cs_unit #(.W(8)) dut (.p(p), .q(q), .u(u), .delta(delta));

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
        p = 8'(a); q = 8'(b);
        #1;
        checks++;
        if (int'(u) != ((a >= b) ? a : b) || int'(delta) != a - b) begin
          failures++;
          if (failures < 10) $display("FAIL p=%0d q=%0d u=%0d delta=%0d", a, b, u, delta);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
