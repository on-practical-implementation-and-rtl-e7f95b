// tb_joint_turbo_ldpc_top: end-to-end test of the dual-mode max* datapath with
// every parameter at its default.
//
// A 200 MHz clock drives a random stream of operations: turbo and LDPC
// operations in runs so that the mode switches between back-to-back
// operations, idle cycles (in_valid low) in between, extreme inputs that make
// the check node saturate, and one reset in the middle of the stream. Each
// result is checked one clock after its inputs (the stated latency) against
// the reference tree, the extrinsic scaling and the PWL max* models; outputs
// must hold during idle cycles, and sat_count must match the number of
// operations that saturated. Every mechanism must occur at least once.
module tb_joint_turbo_ldpc_top;
  import tb_ref_pkg::*;
  import maxstar_pkg::*;

  localparam int NOPS = 20000;

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

  always #2.5ns clk = ~clk;  // 200 MHz

  int checks = 0, failures = 0, cycles = 0;
  int n_turbo = 0, n_ldpc = 0, n_switch = 0, n_idle = 0, n_sat = 0;
  int n_scaled = 0, n_reset = 0;

  always @(posedge clk) cycles++;

  initial begin
    repeat (NOPS * 3) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string tag, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 15) $display("FAIL %s cycle=%0d got=%0d exp=%0d", tag, cycles, got, exp);
    end
  endtask

  initial begin
    int  u [4], v [4], up [4], vp [4];
    int  ej, ek, exp_sat, g1, g2;
    int  hold_j, hold_k;
    bit  es, last_mode_valid;
    mode_e last_mode;
    int  a4 [] = '{64, 192};
    int  b4 [] = '{128, 128};

    rst_n = 1'b0; in_valid = 1'b0; mode = MODE_TURBO; gx1 = '0; gx2 = '0;
    foreach (lu[i]) begin lu[i] = '0; lv[i] = '0; lup[i] = '0; lvp[i] = '0; end
    repeat (3) @(posedge clk);
    #1;
    check("reset valid", int'(out_valid), 0);
    check("reset k", int'(k), 0);
    check("reset count", int'(sat_count), 0);
    rst_n = 1'b1;
    exp_sat = 0;
    last_mode_valid = 0;
    last_mode = MODE_TURBO;

    for (int op = 0; op < NOPS; op++) begin
      int span;
      // drive on the falling edge
      @(negedge clk);
      if (op == NOPS / 2) begin
        // reset in the middle of the stream
        rst_n = 1'b0;
        @(negedge clk);
        check("mid reset valid", int'(out_valid), 0);
        check("mid reset j", int'(j), 0);
        check("mid reset count", int'(sat_count), 0);
        rst_n = 1'b1;
        exp_sat = 0;
        last_mode_valid = 0;
        n_reset++;
      end
      in_valid = ($urandom_range(0, 9) < 8);
      if ($urandom_range(0, 7) == 0) mode = (mode == MODE_TURBO) ? MODE_LDPC : MODE_TURBO;
      span = ($urandom_range(0, 9) == 0) ? 127 : 48;
      for (int i = 0; i < 4; i++) begin
        u[i]  = $urandom_range(0, 2 * span) - span;
        v[i]  = $urandom_range(0, 2 * span) - span;
        up[i] = $urandom_range(0, 2 * span) - span;
        vp[i] = $urandom_range(0, 2 * span) - span;
        lu[i] = 8'(u[i]); lv[i] = 8'(v[i]); lup[i] = 8'(up[i]); lvp[i] = 8'(vp[i]);
      end
      g1 = $urandom_range(0, 255) - 128;
      g2 = $urandom_range(0, 255) - 128;
      gx1 = 8'(g1); gx2 = 8'(g2);
      hold_j = int'(j);
      hold_k = int'(k);

      @(posedge clk);
      #1;
      // one cycle later
      check("out_valid", int'(out_valid), int'(in_valid));
      if (in_valid) begin
        tree_ref(0, mode == MODE_LDPC, u, v, up, vp, ej, ek, es);
        if (mode == MODE_LDPC) begin
          if (scale_ref(ek) != ek) n_scaled++;
          ek = scale_ref(ek);
          n_ldpc++;
        end else begin
          check("J", int'(j), ej);
          n_turbo++;
        end
        check("K", int'(k), ek);
        check("A1", int'(z_a1), pwl_maxstar(g1, g2, 4, a4, b4));
        check("A2", int'(z_a2), pwl_maxstar(g1, g2, 4, a4, b4));
        check("A3", int'(z_a3), pwl_maxstar(g1, g2, 4, a4, b4));
        check("R3", int'(z_r3), r3_maxstar(g1, g2));
        if (es) begin
          exp_sat++;
          n_sat++;
        end
        if (last_mode_valid && last_mode != mode) n_switch++;
        last_mode = mode;
        last_mode_valid = 1;
      end else begin
        check("hold J", int'(j), hold_j);
        check("hold K", int'(k), hold_k);
        n_idle++;
      end
      check("sat_count", int'(sat_count), exp_sat);
    end

    $display("mechanisms: turbo=%0d ldpc=%0d mode_switches=%0d idle=%0d saturated=%0d scaled=%0d resets=%0d",
             n_turbo, n_ldpc, n_switch, n_idle, n_sat, n_scaled, n_reset);
    checks++;
    if (n_turbo == 0 || n_ldpc == 0 || n_switch == 0 || n_idle == 0 || n_sat == 0 ||
        n_scaled == 0 || n_reset == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
