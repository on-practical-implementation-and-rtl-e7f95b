// tb_cs_tree: random test of the CS-tree for N = 4 (default), 3, 5 and 8:
// the output must equal the largest input.
module tb_cs_tree;
  logic signed [7:0] d4 [4], d3 [3], d5 [5], d8 [8];
  logic signed [7:0] o4, o3, o5, o8;
  int checks = 0, failures = 0;

  cs_tree            dut4 (.din(d4), .dout(o4));
  cs_tree #(.N(3))   dut3 (.din(d3), .dout(o3));
  cs_tree #(.N(5))   dut5 (.din(d5), .dout(o5));
  cs_tree #(.N(8))   dut8 (.din(d8), .dout(o8));

  function automatic int maxof(input logic signed [7:0] d [], input int n);
    int m = -1000;
    for (int i = 0; i < n; i++) if (int'(d[i]) > m) m = int'(d[i]);
    return m;
  endfunction

  task automatic check(input string tag, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%0d exp=%0d", tag, got, exp);
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
    for (int t = 0; t < 5000; t++) begin
      foreach (d8[i]) d8[i] = 8'($urandom);
      // also force ties and extremes now and then
      if (t % 7 == 0) d8[$urandom_range(0, 7)] = 8'sh7f;
      if (t % 11 == 0) foreach (d8[i]) d8[i] = 8'sh80;
      foreach (d4[i]) d4[i] = d8[i];
      foreach (d3[i]) d3[i] = d8[7-i];
      foreach (d5[i]) d5[i] = d8[i+3];
      #1;
      check("N4", int'(o4), maxof(d4, 4));
      check("N3", int'(o3), maxof(d3, 3));
      check("N5", int'(o5), maxof(d5, 5));
      check("N8", int'(o8), maxof(d8, 8));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
