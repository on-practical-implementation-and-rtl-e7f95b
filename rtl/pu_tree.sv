// pu_tree: the eight-input joint turbo/LDPC max* / check-node tree.
//
// Seven programmable units in three levels (4, 2, 1). Level-one unit i takes
// L(Ui), L(Vi), L(Ui'), L(Vi'). A unit at a higher level takes the k outputs
// of its two children as L(U), L(V) and their j outputs as L(U'), L(V'), so
//   turbo: J = max* over the eight primed inputs, K = max* over the eight
//          unprimed inputs (two independent 8-input max* operations, as needed
//          for the a-posteriori values of an 8-state turbo decoder);
//   LDPC : K = Ui (+) Vi box-plus combination of all eight inputs, through
//          L(A xor B) = max*{0, A+B} - max*{A, B}; J carries no meaning.
// sat is set when any unit saturated. Purely combinational.
module pu_tree
  import maxstar_pkg::*;
#(
  parameter int           W   = maxstar_pkg::LLR_W,
  parameter maxstar_alg_e ALG = ALG_R4_A3
) (
  input  mode_e               mode,
  input  logic signed [W-1:0] lu  [4],
  input  logic signed [W-1:0] lv  [4],
  input  logic signed [W-1:0] lup [4],
  input  logic signed [W-1:0] lvp [4],
  output logic signed [W-1:0] j,
  output logic signed [W-1:0] k,
  output logic                sat
);
  logic signed [W-1:0] j1 [4], k1 [4];   // level one
  logic signed [W-1:0] j2 [2], k2 [2];   // level two
  logic                s1 [4], s2 [2], s3;

  for (genvar i = 0; i < 4; i++) begin : g_l1
    pu #(.W(W), .ALG(ALG)) u_pu (
      .mode(mode), .lu(lu[i]), .lv(lv[i]), .lup(lup[i]), .lvp(lvp[i]),
      .j(j1[i]), .k(k1[i]), .sat(s1[i])
    );
  end

  for (genvar i = 0; i < 2; i++) begin : g_l2
    pu #(.W(W), .ALG(ALG)) u_pu (
      .mode(mode),
      .lu(k1[2*i]), .lv(k1[2*i+1]), .lup(j1[2*i]), .lvp(j1[2*i+1]),
      .j(j2[i]), .k(k2[i]), .sat(s2[i])
    );
  end

  pu #(.W(W), .ALG(ALG)) u_root (
    .mode(mode), .lu(k2[0]), .lv(k2[1]), .lup(j2[0]), .lvp(j2[1]),
    .j(j), .k(k), .sat(s3)
  );

  assign sat = s1[0] | s1[1] | s1[2] | s1[3] | s2[0] | s2[1] | s3;
endmodule
