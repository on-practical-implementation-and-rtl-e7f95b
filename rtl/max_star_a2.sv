// max_star_a2: generalized max* operator, paired (A2) form.
//
// Uses the symmetry of the optimal PWL coefficients (a_i + a_{r-i-1} = 1,
// b_i = b_{r-i-1}) to fold each pair of planes into one combiner:
// z = max{x*, y_1*, ..., y_{floor(R/2)-1}*} and, for odd R, also the middle
// plane 0.5*(x1 + x2) + b_mid, formed with a hard-wired right shift. A CS unit
// gives x* = max(x1, x2), one adder gives x1 + x2, and a CS-tree of ceil(R/2)
// inputs picks the result. Coefficients and output quantisation are as in
// max_star_a1 (floor to F fractional bits, saturate to W bits), so both give
// identical results for symmetric coefficient sets. Supports R >= 3. Purely
// combinational.
module max_star_a2 #(
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
  // The paired (A2) and offset (A3) forms are exact only for symmetric sets:
  // a_i + a_{R-i-1} = 1 and b_i = b_{R-i-1}.
  for (genvar i = 0; i < R-2; i++) begin : g_chk_sym
    if (A_Q[i] + A_Q[R-3-i] != (1 << CF) || B_Q[i] != B_Q[R-3-i]) begin : g_bad_sym
      $error("coefficient set is not symmetric at i = %0d", i + 1);
    end
  end

  localparam int YW    = W + CF + 4;
  localparam int NPAIR = R / 2 - 1;          // paired combiners
  localparam int NMID  = R % 2;              // middle plane for odd R
  localparam int NT    = 1 + NPAIR + NMID;   // CS-tree inputs = ceil(R/2)

  logic signed [W-1:0]  xs;
  logic signed [W:0]    delta;
  logic signed [W:0]    s;
  logic signed [YW-1:0] term [NT];
  logic signed [YW-1:0] zmax;

  cs_unit #(.W(W)) u_cs (.p(x1), .q(x2), .u(xs), .delta(delta));

  assign s       = {x1[W-1], x1} + {x2[W-1], x2};
  assign term[0] = YW'(xs) <<< CF;

  for (genvar i = 1; i <= NPAIR; i++) begin : g_pair
    lse_pair_combiner #(
      .W(W), .F(F), .CF(CF),
      .AC(A_Q[i-1]), .KC(A_Q[R-i-2] - A_Q[i-1]), .BC(B_Q[i-1])
    ) u_comb (
      .s(s), .xs(xs), .y(term[i])
    );
  end

  if (NMID == 1) begin : g_mid
    // 0.5*(x1 + x2) + b_mid: a one-position right shift of the sum.
    localparam logic signed [YW-1:0] BMID = YW'(B_Q[(R-1)/2-1]) <<< F;
    assign term[NT-1] = (YW'(s) <<< (CF - 1)) + BMID;
  end

  cs_tree #(.W(YW), .N(NT)) u_tree (.din(term), .dout(zmax));

  always_comb begin
    z = W'(sat_int(int'(zmax) >>> CF, W));
  end

  // Unused here: the A2 form needs only the maximum, not the difference.
  logic unused_delta;
  assign unused_delta = ^delta;
endmodule
