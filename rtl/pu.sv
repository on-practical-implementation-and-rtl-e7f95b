// pu: programmable unit of the joint turbo/LDPC check node.
//
// Two max* units, two multiplexers, one adder and a programmable adder (PA)
// serve both decoding modes:
//   turbo: j = max*{L(U'), L(V')},   k = max*{L(U), L(V)}
//   LDPC : j = max*{0, L(U)+L(V)},   k = L(U xor V) = max*{0, L(U)+L(V)} - max*{L(U), L(V)}
// In turbo mode the first multiplexer routes (U', V') to the left max* and the
// second one passes 0 to the PA, which adds it to the right max*. In LDPC mode
// the first multiplexer routes (0, U+V), the second passes the left max*
// result, and the PA subtracts (XOR on the operand, carry-in = 1). The max*
// units are the r = 4 A3 unit (ALG_R4_A3, default) or the r = 3 unit
// (ALG_R3_A2). Inside the unit the max* units and the PA work on W+2 bits,
// so U+V and max*{U, V} never wrap or clip; only the j and k outputs are
// saturated back to W bits. That overflow handling is this implementation's
// choice (clipping U+V to W bits would turn two strong, agreeing LLRs into a
// zero check-node message). The sat flag reports that j or k was clipped.
// Purely combinational.
module pu
  import maxstar_pkg::*;
#(
  parameter int           W   = maxstar_pkg::LLR_W,
  parameter int           F   = maxstar_pkg::LLR_F,
  parameter maxstar_alg_e ALG = ALG_R4_A3
) (
  input  mode_e               mode,
  input  logic signed [W-1:0] lu,    // L(U)
  input  logic signed [W-1:0] lv,    // L(V)
  input  logic signed [W-1:0] lup,   // L(U')
  input  logic signed [W-1:0] lvp,   // L(V')
  output logic signed [W-1:0] j,
  output logic signed [W-1:0] k,
  output logic                sat
);
  localparam int IW = W + 2;   // internal width

  logic signed [IW-1:0] u_w, v_w, up_w, vp_w;
  logic signed [IW-1:0] sum_w;
  logic signed [IW-1:0] ma, mb;        // left max* operands
  logic signed [IW-1:0] left_z, right_z;
  logic signed [IW-1:0] pa_a;          // PA operand from the second mux
  logic                 pa_sub;
  logic signed [IW-1:0] pa_w;

  always_comb begin
    u_w   = IW'(lu);
    v_w   = IW'(lv);
    up_w  = IW'(lup);
    vp_w  = IW'(lvp);
    sum_w = u_w + v_w;
    if (mode == MODE_LDPC) begin
      ma = '0;
      mb = sum_w;
    end else begin
      ma = up_w;
      mb = vp_w;
    end
  end

  if (ALG == ALG_R3_A2) begin : g_r3
    max_star_r3_a2 #(.W(IW), .F(F)) u_left  (.x1(ma),  .x2(mb),  .z(left_z));
    max_star_r3_a2 #(.W(IW), .F(F)) u_right (.x1(u_w), .x2(v_w), .z(right_z));
  end else begin : g_r4
    max_star_r4_a3 #(.W(IW), .F(F)) u_left  (.x1(ma),  .x2(mb),  .z(left_z));
    max_star_r4_a3 #(.W(IW), .F(F)) u_right (.x1(u_w), .x2(v_w), .z(right_z));
  end

  always_comb begin
    pa_sub = (mode == MODE_LDPC);
    pa_a   = pa_sub ? left_z : '0;
    // PA: pa_a + right_z (turbo) or pa_a - right_z (LDPC)
    pa_w   = pa_a + (right_z ^ {IW{pa_sub}}) + IW'(pa_sub);
    j      = W'(sat_int(int'(left_z), W));
    k      = W'(sat_int(int'(pa_w), W));
    sat    = ovf_int(int'(left_z), W) || ovf_int(int'(pa_w), W);
  end
endmodule
