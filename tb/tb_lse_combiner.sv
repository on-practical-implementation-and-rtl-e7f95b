// tb_lse_combiner: exhaustive test of one A1 combiner plane
// y = 0.75 x1 + 0.25 x2 + 0.5 (default) and y = 0.5 x1 + 0.5 x2 + ln2 against
// real arithmetic; y is in units of 2**-11.
module tb_lse_combiner;
  logic signed [7:0]  x1, x2;
  logic signed [19:0] y0, y1;
  int checks = 0, failures = 0;

  lse_combiner                               dut0 (.x1(x1), .x2(x2), .y(y0));
  lse_combiner #(.A1C(128), .A2C(128), .BC(177)) dut1 (.x1(x1), .x2(x2), .y(y1));

  task automatic check(input string tag, input int got, input real exp);
    checks++;
    if (real'(got) != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%0d exp=%f", tag, got, exp);
    end
  endtask

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
        x1 = 8'(a); x2 = 8'(b);
        #1;
        // value / 2**-11 = (real value) * 2048
        check("plane0", int'(y0), (0.75 * a / 8.0 + 0.25 * b / 8.0 + 0.5) * 2048.0);
        check("plane1", int'(y1), (0.5 * a / 8.0 + 0.5 * b / 8.0 + 177.0 / 256.0) * 2048.0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
