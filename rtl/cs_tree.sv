// cs_tree: maximum of N signed words built from N-1 compare-select units.
//
// The tree is laid out as a heap: node i (0 <= i < N-1) is a CS unit fed by
// nodes 2i+1 and 2i+2, and the inputs occupy nodes N-1 .. 2N-2. For N a power
// of two this is a balanced tree of depth log2(N); for other N it is the
// shallowest heap-shaped tree. The heap layout is this implementation's
// choice. Purely combinational.
module cs_tree #(
  parameter int W = maxstar_pkg::LLR_W,
  parameter int N = 4
) (
  input  logic signed [W-1:0] din [N],
  output logic signed [W-1:0] dout
);
  logic signed [W-1:0] node [2*N-1];

  for (genvar l = 0; l < N; l++) begin : g_leaf
    assign node[N-1+l] = din[l];
  end

  for (genvar i = 0; i < N-1; i++) begin : g_cs
    logic signed [W:0] unused_delta;
    cs_unit #(.W(W)) u_cs (
      .p(node[2*i+1]), .q(node[2*i+2]), .u(node[i]), .delta(unused_delta)
    );
  end

  assign dout = node[0];
endmodule
