// max_star_r3_a2: three-term max* approximation z = max{x*, 0.5*(x1 + x2 + 1)}.
//
// The r = 3 generalized max* with power-of-two coefficients (a = 0.5,
// b = 0.5). One adder forms x1 + x2, a second adds the constant 1.0
// (binary 0...01.000 with F = 3 fractional bits), a hard-wired one-position
// arithmetic right shift halves it, and a CS unit takes the larger of that
// and x* = max(x1, x2) from a first CS unit. The sum is kept one bit wider
// than the inputs and the result is saturated to W bits (this
// implementation's choices). Purely combinational.
module max_star_r3_a2 #(
  parameter int W = maxstar_pkg::LLR_W,
  parameter int F = maxstar_pkg::LLR_F
) (
  input  logic signed [W-1:0] x1,
  input  logic signed [W-1:0] x2,
  output logic signed [W-1:0] z
);
  import maxstar_pkg::*;

  localparam logic signed [W+1:0] ONE = (W+2)'(1) <<< F;

  logic signed [W-1:0] xs;
  logic signed [W:0]   d0;
  logic signed [W+1:0] s1;
  logic signed [W:0]   half;
  logic signed [W:0]   zw;
  logic signed [W+1:0] d1;

  cs_unit #(.W(W))   u_cs0 (.p(x2), .q(x1), .u(xs), .delta(d0));

  always_comb begin
    s1   = (W+2)'(x1) + (W+2)'(x2) + ONE;
    half = (W+1)'(s1 >>> 1);
  end

  cs_unit #(.W(W+1)) u_cs1 (.p((W+1)'(xs)), .q(half), .u(zw), .delta(d1));

  always_comb begin
    z = W'(sat_int(int'(zw), W));
  end

  logic unused_d;
  assign unused_d = ^{d0, d1};
endmodule
