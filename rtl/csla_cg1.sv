// csla_cg1 -- carry generator CG1 of the proposed carry-select adder.
//
// Computes the full-carry word c1_1 the adder would produce with an input
// carry of 1: c1_1(i) = c1_1(i-1) & s0(i) | c0(i), with c1_1(-1) = 1.
// With the input carry fixed at 1, bit 0 reduces to s0(0) | c0(0); the
// remaining bits ripple as in CG0.
//
// Interface: s0, c0 in (from the half-sum generator); c1_1 out, N bits.
// Purely combinational. The equations follow the source design.
module csla_cg1 #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] s0,
  input  logic [N-1:0] c0,
  output logic [N-1:0] c1_1
);

  assign c1_1[0] = s0[0] | c0[0];

  for (genvar i = 1; i < N; i++) begin : g_bit
    assign c1_1[i] = (c1_1[i-1] & s0[i]) | c0[i];
  end

endmodule
