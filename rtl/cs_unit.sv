// cs_unit: two-input compare-select (CS) element.
//
// Computes delta = p - q with one extra bit so it cannot overflow, and uses
// the sign of delta to steer a 2:1 multiplexer: u = p when p >= q, u = q
// otherwise. delta is also an output, because the A3 max* architecture and
// the r = 4 unit reuse it to form their correction term. This subtractor +
// multiplexer structure is the one drawn for the CS block; the extra bit on
// delta is this implementation's choice. Purely combinational.
module cs_unit #(
  parameter int W = maxstar_pkg::LLR_W
) (
  input  logic signed [W-1:0] p,
  input  logic signed [W-1:0] q,
  output logic signed [W-1:0] u,
  output logic signed [W:0]   delta
);
  always_comb begin
    delta = {p[W-1], p} - {q[W-1], q};
    u     = delta[W] ? q : p;
  end
endmodule
