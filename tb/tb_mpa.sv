// tb_mpa: exhaustive test of the multiply / programmable-adder block over all
// 9-bit delta values: w = b - a|delta| for (a, b) = (0.25, 0.5) (default) and
// (0.5, ln2 ~ 177/256); w is in units of 2**-11.
module tb_mpa;
  logic signed [8:0]  delta;
  logic signed [19:0] w0, w1;
  int checks = 0, failures = 0;

  mpa                          dut0 (.delta(delta), .w(w0));
  mpa #(.AC(128), .BC(177))    dut1 (.delta(delta), .w(w1));

  task automatic check(input string tag, input int got, input real exp);
    checks++;
    if (real'(got) != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s delta=%0d got=%0d exp=%f", tag, delta, got, exp);
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
    for (int d = -256; d < 256; d++) begin
      real ad;
      ad = (d < 0) ? -d : d;
      delta = 9'(d);
      #1;
      check("a=0.25", int'(w0), (0.5 - 0.25 * ad / 8.0) * 2048.0);
      check("a=0.5",  int'(w1), (177.0 / 256.0 - 0.5 * ad / 8.0) * 2048.0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
