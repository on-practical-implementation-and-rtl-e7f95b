// max_star_r4_a3: four-term max* approximation in A3 form,
//   z = x* + max{0, 0.5 -/+ 0.25*delta},  delta = x1 - x2.
//
// This is the unit used inside the programmable units of the joint check
// node. A CS unit gives x* = max(x1, x2) and delta; delta is shifted right by
// two positions (hard-wired, arithmetic), and a programmable adder (PA) adds
// it to or subtracts it from the constant 0.5 (binary 0...0.100 with F = 3
// fractional bits) depending on the sign of delta. A second CS unit clamps
// the correction at 0 and a final adder adds it to x*. Because the shift
// precedes the PA, a negative delta is rounded towards minus infinity before
// it is added; the result is saturated to W bits (this implementation's
// choice). Purely combinational.
module max_star_r4_a3 #(
  parameter int W = maxstar_pkg::LLR_W,
  parameter int F = maxstar_pkg::LLR_F
) (
  input  logic signed [W-1:0] x1,
  input  logic signed [W-1:0] x2,
  output logic signed [W-1:0] z
);
  import maxstar_pkg::*;

  localparam logic signed [W:0] HALF = (W+1)'(1) <<< (F - 1);

  logic signed [W-1:0] xs;
  logic signed [W:0]   delta;
  logic signed [W:0]   dq;     // delta >> 2
  logic                sub;    // PA mode: 1 = subtract (delta >= 0)
  logic signed [W:0]   w1;
  logic signed [W:0]   ws;
  logic signed [W+1:0] d1;
  logic signed [W+1:0] zsum;

  cs_unit #(.W(W)) u_cs0 (.p(x1), .q(x2), .u(xs), .delta(delta));

  always_comb begin
    dq  = delta >>> 2;
    sub = ~delta[W];
    w1  = HALF + (dq ^ {(W+1){sub}}) + (W+1)'(sub);
  end

  cs_unit #(.W(W+1)) u_cs1 (.p('0), .q(w1), .u(ws), .delta(d1));

  always_comb begin
    zsum = (W+2)'(xs) + (W+2)'(ws);
    z    = W'(sat_int(int'(zsum), W));
  end

  logic unused_d;
  assign unused_d = ^d1;
endmodule
