// mpa: multiply / programmable-adder block of the A3 max* architecture.
//
// Computes w = b -/+ a*delta = b - a*|delta| without forming |delta|: the
// product a*delta is passed through XOR gates controlled by the inverted sign
// of delta, and the same bit drives the adder's carry-in. When delta >= 0 the
// product is inverted and 1 is added (b - a*delta); when delta < 0 it is added
// unchanged (b + a*delta). Coefficients are integers scaled by 2**CF; delta
// carries F fractional bits, and w is exact, in units of 2**-(F+CF).
// Purely combinational.
module mpa #(
  parameter int DW = 9,    // width of delta
  parameter int F  = maxstar_pkg::LLR_F,
  parameter int CF = maxstar_pkg::COEF_F,
  parameter int AC = 64,   // a_i * 2**CF
  parameter int BC = 128   // b_i * 2**CF
) (
  input  logic signed [DW-1:0]    delta,
  output logic signed [DW+CF+2:0] w
);
  localparam int WW = DW + CF + 3;
  localparam logic signed [WW-1:0] AK = WW'(AC);
  localparam logic signed [WW-1:0] BK = WW'(BC) <<< F;

  logic signed [WW-1:0] prod;
  logic                 sub;   // 1: subtract (delta >= 0)

  always_comb begin
    sub  = ~delta[DW-1];
    prod = AK * WW'(delta);
    w    = BK + (prod ^ {WW{sub}}) + WW'(sub);
  end
endmodule
