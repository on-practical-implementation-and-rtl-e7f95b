// tb_pu_tree: random test of the seven-unit joint tree in both modes and with
// both max* options, against a reference tree of unit models. It also checks
// what the tree is for:
//   turbo: J and K are close to the exact 8-input log-sum-exp of the primed
//          and unprimed inputs (within 1.2, three levels of approximation);
//   LDPC : K has the sign of the product of the eight inputs whenever all
//          magnitudes are at least 3.0.
module tb_pu_tree;
  import tb_ref_pkg::*;
  import maxstar_pkg::*;

  mode_e             mode;
  logic signed [7:0] lu [4], lv [4], lup [4], lvp [4];
  logic signed [7:0] j4, k4, j3, k3;
  logic              s4, s3;
  int checks = 0, failures = 0;
  int n_turbo = 0, n_ldpc = 0, n_sign = 0, n_sat = 0;

  pu_tree                    dut4 (.mode(mode), .lu(lu), .lv(lv), .lup(lup), .lvp(lvp), .j(j4), .k(k4), .sat(s4));
  pu_tree #(.ALG(ALG_R3_A2)) dut3 (.mode(mode), .lu(lu), .lv(lv), .lup(lup), .lvp(lvp), .j(j3), .k(k3), .sat(s3));

  task automatic check(input string tag, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s mode=%s got=%0d exp=%0d", tag, mode.name(), got, exp);
    end
  endtask

  function automatic real lse8(input int a [4], input int b [4]);
    real acc = 0.0;
    for (int i = 0; i < 4; i++) acc += $exp(a[i] / 8.0) + $exp(b[i] / 8.0);
    return $ln(acc);
  endfunction

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int u [4], v [4], up [4], vp [4];
    int ej, ek;
    bit es, big;
    for (int t = 0; t < 20000; t++) begin
      int span;
      mode = mode_e'($urandom_range(0, 1));
      span = (t % 3 == 0) ? 127 : 60;
      big  = 1;
      for (int i = 0; i < 4; i++) begin
        u[i]  = $urandom_range(0, 2 * span) - span;
        v[i]  = $urandom_range(0, 2 * span) - span;
        up[i] = $urandom_range(0, 2 * span) - span;
        vp[i] = $urandom_range(0, 2 * span) - span;
        if (t % 5 == 0) begin  // strong LLRs for the sign property
          u[i] = (u[i] < 0) ? u[i] - 24 : u[i] + 24;
          v[i] = (v[i] < 0) ? v[i] - 24 : v[i] + 24;
          u[i] = clamp(u[i]); v[i] = clamp(v[i]);
        end
        if (u[i] > -24 && u[i] < 24) big = 0;
        if (v[i] > -24 && v[i] < 24) big = 0;
        lu[i] = 8'(u[i]); lv[i] = 8'(v[i]); lup[i] = 8'(up[i]); lvp[i] = 8'(vp[i]);
      end
      #1;
      tree_ref(0, mode == MODE_LDPC, u, v, up, vp, ej, ek, es);
      if (mode == MODE_LDPC) begin
        check("r4 k", int'(k4), ek);
        n_ldpc++;
      end else begin
        check("r4 j", int'(j4), ej);
        check("r4 k", int'(k4), ek);
        n_turbo++;
      end
      check("r4 sat", int'(s4), int'(es));
      n_sat += int'(es);
      tree_ref(1, mode == MODE_LDPC, u, v, up, vp, ej, ek, es);
      if (mode == MODE_TURBO) check("r3 j", int'(j3), ej);
      check("r3 k", int'(k3), ek);
      check("r3 sat", int'(s3), int'(es));
      if (mode == MODE_TURBO && !s4) begin
        real ej_r, ek_r;
        ej_r = lse8(up, vp) - real'(int'(j4)) / 8.0;
        ek_r = lse8(u, v) - real'(int'(k4)) / 8.0;
        checks++;
        if (ej_r > 1.2 || ej_r < -1.2 || ek_r > 1.2 || ek_r < -1.2) begin
          failures++;
          if (failures < 10) $display("FAIL turbo accuracy errJ=%f errK=%f", ej_r, ek_r);
        end
      end
      if (mode == MODE_LDPC && big) begin
        int neg;
        neg = 0;
        for (int i = 0; i < 4; i++) neg += int'(u[i] < 0) + int'(v[i] < 0);
        checks++;
        n_sign++;
        if (k4 == 0 || ((k4 < 0) != (neg % 2 == 1))) begin
          failures++;
          if (failures < 10) $display("FAIL ldpc sign k=%0d negatives=%0d", k4, neg);
        end
      end
    end
    checks++;
    if (n_turbo == 0 || n_ldpc == 0 || n_sign == 0 || n_sat == 0) begin
      failures++;
      $display("FAIL coverage turbo=%0d ldpc=%0d sign=%0d sat=%0d", n_turbo, n_ldpc, n_sign, n_sat);
    end
    $display("coverage: turbo=%0d ldpc=%0d sign-checked=%0d saturated=%0d", n_turbo, n_ldpc, n_sign, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
