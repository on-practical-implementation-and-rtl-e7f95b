// tb_workloads: the decoding situations the datapath is meant for, run on the
// top level with default parameters and held against exact arithmetic.
//
//  * LDPC check nodes of degree 6 (rate-1/2 regular code with column weight 3)
//    and degree 7 (the heavier rows of a rate-1/2 irregular code). Unused
//    inputs of the eight-input node are tied to +15.875, the largest LLR,
//    which acts as a near-neutral element of the check-node combination.
//    The scaled output K is compared with 0.9 times the exact sum-product
//    (tanh-rule) value: the sign must agree whenever the exact magnitude is
//    at least 1.0, and the mean absolute error must stay below 0.3.
//  * Both check-node options run side by side on the same inputs: the r = 4
//    unit with scaling 0.9 (230/256, the default top) and the r = 3 unit with
//    scaling 0.85 (218/256), the setting for the irregular rate-1/2 code.
//  * 8-state turbo a-posteriori step: J and K must approach the exact
//    log-sum-exp of eight state metrics (within 1.2 each, mean below 0.6).
module tb_workloads;
  import tb_ref_pkg::*;
  import maxstar_pkg::*;

  logic              clk = 1'b0;
  logic              rst_n;
  logic              in_valid;
  mode_e             mode;
  logic signed [7:0] lu [4], lv [4], lup [4], lvp [4];
  logic signed [7:0] gx1, gx2;
  logic              out_valid;
  logic signed [7:0] j, k, z_a1, z_a2, z_a3, z_r3;
  logic [15:0]       sat_count;

  joint_turbo_ldpc_top dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .mode(mode),
    .lu(lu), .lv(lv), .lup(lup), .lvp(lvp), .gx1(gx1), .gx2(gx2),
    .out_valid(out_valid), .j(j), .k(k),
    .z_a1(z_a1), .z_a2(z_a2), .z_a3(z_a3), .z_r3(z_r3), .sat_count(sat_count)
  );

  logic              out_valid3;
  logic signed [7:0] j3, k3, z3_a1, z3_a2, z3_a3, z3_r3;
  logic [15:0]       sat_count3;

  joint_turbo_ldpc_top #(.ALG(ALG_R3_A2), .SCALE_NUM(218)) dut3 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .mode(mode),
    .lu(lu), .lv(lv), .lup(lup), .lvp(lvp), .gx1(gx1), .gx2(gx2),
    .out_valid(out_valid3), .j(j3), .k(k3),
    .z_a1(z3_a1), .z_a2(z3_a2), .z_a3(z3_a3), .z_r3(z3_r3), .sat_count(sat_count3)
  );

  always #2.5ns clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Gaussian-like channel LLR: mean 2.0 with spread, clamped to 8 bits.
  function automatic int channel_llr();
    real s;
    s = 0.0;
    for (int i = 0; i < 4; i++) s += real'($urandom_range(0, 1000)) / 1000.0;
    s = (s - 2.0) * 3.5 + 2.0;          // mean 2.0, std ~2.0
    if ($urandom_range(0, 1)) s = -s;   // random code bit
    return clamp(int'($floor(s * 8.0 + 0.5)));
  endfunction

  task automatic run_cn(input int degree, input int nvec);
    int  x [8];
    int  u [4], v [4];
    real prod, exact, exact3, err, sum_err, sum_err3;
    sum_err = 0.0;
    sum_err3 = 0.0;
    for (int t = 0; t < nvec; t++) begin
      @(negedge clk);
      prod = 1.0;
      for (int i = 0; i < 8; i++) begin
        x[i] = (i < degree) ? channel_llr() : 127;
        if (i < degree) prod *= $tanh(real'(x[i]) / 16.0);
      end
      if (prod > 0.999999) prod = 0.999999;
      if (prod < -0.999999) prod = -0.999999;
      exact  = 0.9 * 2.0 * 0.5 * $ln((1.0 + prod) / (1.0 - prod));
      exact3 = 0.85 * 2.0 * 0.5 * $ln((1.0 + prod) / (1.0 - prod));
      for (int i = 0; i < 4; i++) begin
        lu[i] = 8'(x[2*i]); lv[i] = 8'(x[2*i+1]);
        lup[i] = '0; lvp[i] = '0;
      end
      mode = MODE_LDPC;
      in_valid = 1'b1;
      @(posedge clk);
      #1;
      err = real'(int'(k)) / 8.0 - exact;
      sum_err += (err < 0) ? -err : err;
      err = real'(int'(k3)) / 8.0 - exact3;
      sum_err3 += (err < 0) ? -err : err;
      if (exact >= 1.0 || exact <= -1.0) begin
        checks++;
        if ((k > 0) != (exact > 0) || k == 0 || (k3 > 0) != (exact > 0) || k3 == 0) begin
          failures++;
          if (failures < 10) $display("FAIL degree %0d sign: k=%0d k3=%0d exact=%f", degree, k, k3, exact);
        end
      end
    end
    $display("degree-%0d check node: mean |error| r=4/0.9 %f, r=3/0.85 %f over %0d nodes",
             degree, sum_err / nvec, sum_err3 / nvec, nvec);
    checks++;
    if (sum_err / nvec > 0.3 || sum_err3 / nvec > 0.3) begin
      failures++;
      $display("FAIL degree %0d mean error too large", degree);
    end
  endtask

  task automatic run_turbo(input int nvec);
    int  a [8], b [8];
    real ea, eb, ej, ek, sum_err;
    sum_err = 0.0;
    for (int t = 0; t < nvec; t++) begin
      @(negedge clk);
      ea = 0.0; eb = 0.0;
      for (int i = 0; i < 8; i++) begin
        a[i] = $urandom_range(0, 160) - 80;
        b[i] = $urandom_range(0, 160) - 80;
        ea += $exp(real'(a[i]) / 8.0);
        eb += $exp(real'(b[i]) / 8.0);
      end
      for (int i = 0; i < 4; i++) begin
        lu[i] = 8'(a[2*i]); lv[i] = 8'(a[2*i+1]);
        lup[i] = 8'(b[2*i]); lvp[i] = 8'(b[2*i+1]);
      end
      mode = MODE_TURBO;
      in_valid = 1'b1;
      @(posedge clk);
      #1;
      ek = real'(int'(k)) / 8.0 - $ln(ea);
      ej = real'(int'(j)) / 8.0 - $ln(eb);
      sum_err += ((ek < 0) ? -ek : ek) + ((ej < 0) ? -ej : ej);
      checks++;
      if (ek > 1.2 || ek < -1.2 || ej > 1.2 || ej < -1.2) begin
        failures++;
        if (failures < 10) $display("FAIL turbo errK=%f errJ=%f", ek, ej);
      end
    end
    checks++;
    $display("8-state turbo max*: mean |error| = %f over %0d pairs", sum_err / (2 * nvec), nvec);
    if (sum_err / (2 * nvec) > 0.6) begin
      failures++;
      $display("FAIL turbo mean error too large");
    end
  endtask

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; mode = MODE_LDPC; gx1 = '0; gx2 = '0;
    foreach (lu[i]) begin lu[i] = '0; lv[i] = '0; lup[i] = '0; lvp[i] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run_cn(6, 20000);
    run_cn(7, 20000);
    run_turbo(20000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
