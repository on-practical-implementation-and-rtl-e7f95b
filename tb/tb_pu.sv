// tb_pu: random and directed test of the programmable unit in both modes and
// with both max* options (r = 4 A3 default, r = 3 A2). Expected j, k and the
// saturation flag come from the reference model of the unit's equations:
//   turbo: j = max*{U', V'}, k = max*{U, V}
//   LDPC : j = max*{0, U+V}, k = j - max*{U, V}.
// A property check also confirms that in LDPC mode k has the sign of U*V
// whenever both magnitudes are at least 1.0.
module tb_pu;
  import tb_ref_pkg::*;
  import maxstar_pkg::*;

  mode_e             mode;
  logic signed [7:0] lu, lv, lup, lvp;
  logic signed [7:0] j4, k4, j3, k3;
  logic              s4, s3;
  int checks = 0, failures = 0;
  int n_sat = 0;

  pu                      dut4 (.mode(mode), .lu(lu), .lv(lv), .lup(lup), .lvp(lvp), .j(j4), .k(k4), .sat(s4));
  pu #(.ALG(ALG_R3_A2))   dut3 (.mode(mode), .lu(lu), .lv(lv), .lup(lup), .lvp(lvp), .j(j3), .k(k3), .sat(s3));

  task automatic check(input string tag, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s mode=%s u=%0d v=%0d u'=%0d v'=%0d got=%0d exp=%0d",
                 tag, mode.name(), lu, lv, lup, lvp, got, exp);
    end
  endtask

  task automatic apply(input mode_e m, input int u, input int v, input int up, input int vp);
    int ej, ek;
    bit es;
    mode = m; lu = 8'(u); lv = 8'(v); lup = 8'(up); lvp = 8'(vp);
    #1;
    pu_ref(0, m == MODE_LDPC, u, v, up, vp, ej, ek, es);
    check("r4 j", int'(j4), ej);
    check("r4 k", int'(k4), ek);
    check("r4 sat", int'(s4), int'(es));
    n_sat += int'(es);
    pu_ref(1, m == MODE_LDPC, u, v, up, vp, ej, ek, es);
    check("r3 j", int'(j3), ej);
    check("r3 k", int'(k3), ek);
    check("r3 sat", int'(s3), int'(es));
    if (m == MODE_LDPC && (u >= 8 || u <= -8) && (v >= 8 || v <= -8)) begin
      checks++;
      if ((int'(k4) > 0) != ((u > 0) == (v > 0)) || k4 == 0) begin
        failures++;
        if (failures < 10) $display("FAIL sign u=%0d v=%0d k=%0d", u, v, k4);
      end
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
    // directed: saturation of U+V and of the PA, zero inputs, extremes
    apply(MODE_LDPC, 127, 127, 0, 0);
    apply(MODE_LDPC, -128, -128, 0, 0);
    apply(MODE_LDPC, 127, -128, 0, 0);
    apply(MODE_TURBO, 127, 127, 127, 127);
    apply(MODE_TURBO, -128, -128, -128, -128);
    apply(MODE_LDPC, 0, 0, 5, 5);
    for (int t = 0; t < 40000; t++) begin
      mode_e m;
      m = mode_e'($urandom_range(0, 1));
      apply(m, int'($signed(8'($urandom))), int'($signed(8'($urandom))),
               int'($signed(8'($urandom))), int'($signed(8'($urandom))));
    end
    checks++;
    if (n_sat == 0) begin
      failures++;
      $display("FAIL saturation never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
