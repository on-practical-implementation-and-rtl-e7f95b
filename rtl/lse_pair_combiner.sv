// lse_pair_combiner: combiner of the A2 max* architecture.
//
// Merges the two symmetric PWL planes y_i and y_{r-i-1} into their maximum
// y_i* = a_i*(x1 + x2) + k_i*x* + b_i, where x* = max(x1, x2) and
// k_i = a_{r-i-1} - a_i. The sum x1 + x2 comes from an adder shared by all
// combiners. Coefficients are integers scaled by 2**CF; the result is exact,
// in units of 2**-(F+CF). Purely combinational.
module lse_pair_combiner #(
  parameter int W  = maxstar_pkg::LLR_W,
  parameter int F  = maxstar_pkg::LLR_F,
  parameter int CF = maxstar_pkg::COEF_F,
  parameter int AC = 64,   // a_i * 2**CF
  parameter int KC = 128,  // k_i * 2**CF
  parameter int BC = 128   // b_i * 2**CF
) (
  input  logic signed [W:0]      s,    // x1 + x2
  input  logic signed [W-1:0]    xs,   // x* = max(x1, x2)
  output logic signed [W+CF+3:0] y
);
  localparam int YW = W + CF + 4;
  localparam logic signed [YW-1:0] AK = YW'(AC);
  localparam logic signed [YW-1:0] KK = YW'(KC);
  localparam logic signed [YW-1:0] BK = YW'(BC) <<< F;

  always_comb begin
    y = AK * YW'(s) + KK * YW'(xs) + BK;
  end
endmodule
