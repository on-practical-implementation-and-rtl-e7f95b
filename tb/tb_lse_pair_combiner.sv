// tb_lse_pair_combiner: exhaustive test that the paired combiner returns
// max{y_i, y_{r-i-1}} for the symmetric planes 0.25 x1 + 0.75 x2 + 0.5 and
// 0.75 x1 + 0.25 x2 + 0.5 (output in units of 2**-11).
module tb_lse_pair_combiner;
  logic signed [7:0]  x1, x2, xs;
  logic signed [8:0]  s;
  logic signed [19:0] y;
  int checks = 0, failures = 0;

  lse_pair_combiner dut (.s(s), .xs(xs), .y(y));

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
        real ya, yb, e;
        x1 = 8'(a); x2 = 8'(b);
        s  = 9'(a + b);
        xs = (a > b) ? x1 : x2;
        #1;
        ya = 0.25 * a / 8.0 + 0.75 * b / 8.0 + 0.5;
        yb = 0.75 * a / 8.0 + 0.25 * b / 8.0 + 0.5;
        e  = ((ya > yb) ? ya : yb) * 2048.0;
        checks++;
        if (real'(int'(y)) != e) begin
          failures++;
          if (failures < 10) $display("FAIL x1=%0d x2=%0d y=%0d exp=%f", a, b, y, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
