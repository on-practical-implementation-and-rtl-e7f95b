// lse_combiner: one PWL plane of the generalized max* (A1 architecture).
//
// y = A1C*x1 + A2C*x2 + BC, i.e. y_i = a_{r-i-1}*x1 + a_i*x2 + b_i: two constant
// multiplications and two additions. Coefficients are integers scaled by
// 2**CF; x1, x2 carry F fractional bits, so y is returned exactly, in units of
// 2**-(F+CF), without rounding. Keeping full precision here is this
// implementation's choice: it makes A1, A2 and A3 bit-identical, with one
// rounding step at the max* output. Purely combinational.
module lse_combiner #(
  parameter int W   = maxstar_pkg::LLR_W,
  parameter int F   = maxstar_pkg::LLR_F,
  parameter int CF  = maxstar_pkg::COEF_F,
  parameter int A1C = 192,  // a_{r-i-1} * 2**CF
  parameter int A2C = 64,   // a_i * 2**CF
  parameter int BC  = 128   // b_i * 2**CF
) (
  input  logic signed [W-1:0]      x1,
  input  logic signed [W-1:0]      x2,
  output logic signed [W+CF+3:0]   y
);
  localparam int YW = W + CF + 4;
  localparam logic signed [YW-1:0] A1K = YW'(A1C);
  localparam logic signed [YW-1:0] A2K = YW'(A2C);
  localparam logic signed [YW-1:0] BK  = YW'(BC) <<< F;

  always_comb begin
    y = A1K * YW'(x1) + A2K * YW'(x2) + BK;
  end
endmodule
