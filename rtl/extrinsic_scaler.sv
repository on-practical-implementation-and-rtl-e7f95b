// extrinsic_scaler: constant scaling of an LLR by SCALE_NUM / 2**SCALE_SHIFT.
//
// Applied to the check-node output in LDPC mode, where scaling the extrinsic
// information by about 0.9 recovers the small loss of the r = 3 and r = 4
// max* approximations. The factor 0.9 is quantised to 230/256 = 0.898; the
// product is rounded half up and saturated to W bits. The constant-multiplier
// form and the rounding are this implementation's choices. With en = 0 the
// input is passed unchanged (turbo mode). Purely combinational.
module extrinsic_scaler #(
  parameter int W           = maxstar_pkg::LLR_W,
  parameter int SCALE_NUM   = 230,
  parameter int SCALE_SHIFT = 8
) (
  input  logic                en,
  input  logic signed [W-1:0] din,
  output logic signed [W-1:0] dout
);
  import maxstar_pkg::*;

  localparam int PW = W + SCALE_SHIFT + 2;

  logic signed [PW-1:0] prod;
  logic signed [PW-1:0] rnd;

  always_comb begin
    prod = PW'(din) * PW'(SCALE_NUM) + (PW'(1) <<< (SCALE_SHIFT - 1));
    rnd  = prod >>> SCALE_SHIFT;
    dout = en ? W'(sat_int(int'(rnd), W)) : din;
  end
endmodule
