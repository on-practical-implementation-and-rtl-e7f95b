// max_star_a3: generalized max* operator, offset (A3) form.
//
// Rewrites the paired planes relative to x* = max(x1, x2):
//   z = x* + max{0, w_1*, ..., w_{ceil(R/2)-1}*},  w_i* = b_i - a_i*|x1 - x2|.
// One CS unit yields both x* and delta = x1 - x2; each w_i* is an MPA block
// whose programmable adder adds or subtracts a_i*delta according to the sign
// of delta, so |delta| is never formed. For odd R the middle plane (a = 0.5)
// is one more MPA term. A CS-tree over {0, w_i*} and a final adder give z.
// Coefficients use the same A_Q/B_Q convention as max_star_a1 (only the
// first ceil(R/2)-1 entries are used, which relies on the coefficient
// symmetry); the output is floored to F fractional bits and saturated to W
// bits, so A1, A2 and A3 agree bit for bit. Supports R >= 3. Purely
// combinational.
module max_star_a3 #(
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

  localparam int NW = (R + 1) / 2 - 1;   // MPA blocks, i = 1..ceil(R/2)-1
  localparam int YW = W + CF + 4;        // = (W+1) + CF + 3, the MPA width

  logic signed [W-1:0]  xs;
  logic signed [W:0]    delta;
  logic signed [YW-1:0] term [NW+1];
  logic signed [YW-1:0] wmax;
  logic signed [YW-1:0] zsum;

  cs_unit #(.W(W)) u_cs (.p(x1), .q(x2), .u(xs), .delta(delta));

  assign term[0] = '0;

  for (genvar i = 1; i <= NW; i++) begin : g_mpa
    mpa #(
      .DW(W + 1), .F(F), .CF(CF), .AC(A_Q[i-1]), .BC(B_Q[i-1])
    ) u_mpa (
      .delta(delta), .w(term[i])
    );
  end

  cs_tree #(.W(YW), .N(NW + 1)) u_tree (.din(term), .dout(wmax));

  always_comb begin
    zsum = (YW'(xs) <<< CF) + wmax;
    z    = W'(sat_int(int'(zsum) >>> CF, W));
  end
endmodule
