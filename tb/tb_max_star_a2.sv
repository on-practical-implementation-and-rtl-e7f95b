// tb_max_star_a2: exhaustive test of the generalized max* unit (max_star_a2) over all pairs of
// 8-bit operands, for R = 4 (default coefficients a = {0.25, 0.75},
// b = {0.5, 0.5}), R = 3 (a = 0.5, b = ln 2, the MacLaurin/average setting),
// R = 5 and R = 6 (symmetric coefficient sets). The expected value evaluates
// every PWL plane directly in real arithmetic, floors it onto the 2**-3 grid
// and clamps it to 8 bits. For R = 4 the result is also held against the exact
// log(e^x1 + e^x2) (tolerance 0.4 = approximation error + one LSB).
module tb_max_star_a2;
  import tb_ref_pkg::*;

  logic signed [7:0] x1, x2;
  logic signed [7:0] z4, z3, z5, z6;
  int checks = 0, failures = 0;

  localparam int A3Q [1] = '{128};
  localparam int B3Q [1] = '{177};
  localparam int A5Q [3] = '{64, 128, 192};
  localparam int B5Q [3] = '{128, 176, 128};
  localparam int A6Q [4] = '{32, 96, 160, 224};
  localparam int B6Q [4] = '{96, 144, 144, 96};

  max_star_a2                                      dut4 (.x1(x1), .x2(x2), .z(z4));
  max_star_a2 #(.R(3), .A_Q(A3Q), .B_Q(B3Q))       dut3 (.x1(x1), .x2(x2), .z(z3));
  max_star_a2 #(.R(5), .A_Q(A5Q), .B_Q(B5Q))       dut5 (.x1(x1), .x2(x2), .z(z5));
  max_star_a2 #(.R(6), .A_Q(A6Q), .B_Q(B6Q))       dut6 (.x1(x1), .x2(x2), .z(z6));

  task automatic check(input string tag, input int a, input int b, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s x1=%0d x2=%0d got=%0d exp=%0d", tag, a, b, got, exp);
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
    int a4 [] = '{64, 192};
    int b4 [] = '{128, 128};
    int a3 [] = '{128};
    int b3 [] = '{177};
    int a5 [] = '{64, 128, 192};
    int b5 [] = '{128, 176, 128};
    int a6 [] = '{32, 96, 160, 224};
    int b6 [] = '{96, 144, 144, 96};
    for (int a = -128; a < 128; a++) begin
      for (int b = -128; b < 128; b++) begin
        x1 = 8'(a); x2 = 8'(b);
        #1;
        check("R4", a, b, int'(z4), pwl_maxstar(a, b, 4, a4, b4));
        check("R3", a, b, int'(z3), pwl_maxstar(a, b, 3, a3, b3));
        check("R5", a, b, int'(z5), pwl_maxstar(a, b, 5, a5, b5));
        check("R6", a, b, int'(z6), pwl_maxstar(a, b, 6, a6, b6));
        if (a < 110 && b < 110) begin
          real e;
          e = lse(a / 8.0, b / 8.0) - real'(int'(z4)) / 8.0;
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
