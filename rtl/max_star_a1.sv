// max_star_a1: generalized max* operator, direct (A1) form.
//
// z = max{x1, y_1, ..., y_{R-2}, x2} with y_i = a_{R-i-1}*x1 + a_i*x2 + b_i, the
// best R-term piecewise-linear convex approximation of ln(e^x1 + e^x2). R-2
// combiners compute the planes and a CS-tree of R inputs picks the largest.
// The coefficients are passed as A_Q[i-1] = a_i*2**CF and B_Q[i-1] = b_i*2**CF
// for i = 1..R-2; the defaults are the r = 4 power-of-two set
// a = {0.25, 0.75}, b = {0.5, 0.5}. The maximum is taken at full precision,
// then floored to F fractional bits and saturated to W bits; that output
// quantisation is this implementation's choice. Supports R >= 3. Purely
// combinational.
module max_star_a1 #(
  parameter int W  = maxstar_pkg::LLR_W,
  parameter int F  = maxstar_pkg::LLR_F,
  parameter int CF = maxstar_pkg::COEF_F,
  parameter int R  = 4,
  parameter int A_Q [R-2] = '{64, 192},
  parameter int B_Q [R-2] = '{128, 128}
) (
  input  logic signed [W-1:0] x1,
  input  logic signed [W-1:0] x2,
  output logic signed [W-1:0] z
);
  import maxstar_pkg::*;

  // Parameter rules: at least three planes, coefficients strictly between 0
  // and 1 and increasing.
  if (R < 3) begin : g_bad_r
    $error("max* needs R >= 3 (R = 2 is plain max)");
  end
  for (genvar i = 0; i < R-2; i++) begin : g_chk_a
    if (A_Q[i] <= 0 || A_Q[i] >= (1 << CF)) begin : g_bad_a
      $error("coefficient a_%0d = %0d/2**%0d out of range", i + 1, A_Q[i], CF);
    end
  end
  for (genvar i = 1; i < R-2; i++) begin : g_chk_order
    if (A_Q[i] <= A_Q[i-1]) begin : g_bad_order
      $error("coefficients a_%0d and a_%0d are not increasing", i, i + 1);
    end
  end

  localparam int YW = W + CF + 4;

  logic signed [YW-1:0] term [R];
  logic signed [YW-1:0] zmax;

  assign term[0]   = YW'(x1) <<< CF;
  assign term[R-1] = YW'(x2) <<< CF;

  for (genvar i = 1; i <= R-2; i++) begin : g_comb
    lse_combiner #(
      .W(W), .F(F), .CF(CF),
      .A1C(A_Q[R-i-2]), .A2C(A_Q[i-1]), .BC(B_Q[i-1])
    ) u_comb (
      .x1(x1), .x2(x2), .y(term[i])
    );
  end

  cs_tree #(.W(YW), .N(R)) u_tree (.din(term), .dout(zmax));

  always_comb begin
    z = W'(sat_int(int'(zmax) >>> CF, W));
  end
endmodule
