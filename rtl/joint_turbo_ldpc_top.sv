// joint_turbo_ldpc_top: dual-mode turbo/LDPC max* datapath.
//
// Two parts stand side by side:
//  * The joint check node: a tree of seven programmable units (pu_tree) built
//    on the r = 4 A3 max* unit. In turbo mode it returns two independent
//    8-input max* results (J over L(U0'..V3'), K over L(U0..V3)); in LDPC mode
//    K is the check-node combination of the eight inputs L(U0..V3), scaled by
//    the extrinsic scaling factor (~0.9).
//  * The generalized max* operator on one operand pair (gx1, gx2) in its three
//    architectural forms A1, A2 and A3 (R = 4, power-of-two coefficients, all
//    three bit-identical) and the r = 3 unit.
// Timing: all results are registered once. Inputs sampled together with
// in_valid appear on the outputs, with out_valid, on the next clock edge
// (latency 1, one operation per cycle). The register stage, the asynchronous
// active-low reset and the saturation counter are this implementation's
// choices; the datapath itself is combinational. sat_count counts the valid
// operations in which a check-node sum or PA result had to be saturated.
module joint_turbo_ldpc_top
  import maxstar_pkg::*;
#(
  parameter int           W           = maxstar_pkg::LLR_W,
  parameter maxstar_alg_e ALG         = ALG_R4_A3,
  parameter int           SCALE_NUM   = 230,  // extrinsic scaling 0.9 ~ 230/256
  parameter int           SCALE_SHIFT = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  mode_e               mode,
  input  logic signed [W-1:0] lu  [4],
  input  logic signed [W-1:0] lv  [4],
  input  logic signed [W-1:0] lup [4],
  input  logic signed [W-1:0] lvp [4],
  input  logic signed [W-1:0] gx1,
  input  logic signed [W-1:0] gx2,
  output logic                out_valid,
  output logic signed [W-1:0] j,
  output logic signed [W-1:0] k,
  output logic signed [W-1:0] z_a1,
  output logic signed [W-1:0] z_a2,
  output logic signed [W-1:0] z_a3,
  output logic signed [W-1:0] z_r3,
  output logic [15:0]         sat_count
);
  logic signed [W-1:0] tj, tk, sk;
  logic                tsat;
  logic signed [W-1:0] g1, g2, g3, g4;

  pu_tree #(.W(W), .ALG(ALG)) u_tree (
    .mode(mode), .lu(lu), .lv(lv), .lup(lup), .lvp(lvp),
    .j(tj), .k(tk), .sat(tsat)
  );

  extrinsic_scaler #(.W(W), .SCALE_NUM(SCALE_NUM), .SCALE_SHIFT(SCALE_SHIFT)) u_scale (
    .en(mode == MODE_LDPC), .din(tk), .dout(sk)
  );

  max_star_a1    #(.W(W)) u_a1 (.x1(gx1), .x2(gx2), .z(g1));
  max_star_a2    #(.W(W)) u_a2 (.x1(gx1), .x2(gx2), .z(g2));
  max_star_a3    #(.W(W)) u_a3 (.x1(gx1), .x2(gx2), .z(g3));
  max_star_r3_a2 #(.W(W)) u_r3 (.x1(gx1), .x2(gx2), .z(g4));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      j         <= '0;
      k         <= '0;
      z_a1      <= '0;
      z_a2      <= '0;
      z_a3      <= '0;
      z_r3      <= '0;
      sat_count <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        j    <= tj;
        k    <= sk;
        z_a1 <= g1;
        z_a2 <= g2;
        z_a3 <= g3;
        z_r3 <= g4;
        if (tsat && sat_count != '1) sat_count <= sat_count + 16'd1;
      end
    end
  end
endmodule
