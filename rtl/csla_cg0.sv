// csla_cg0 -- carry generator CG0 of the proposed carry-select adder.
//
// Computes the full-carry word c1_0 the adder would produce with an input
// carry of 0: c1_0(i) = c1_0(i-1) & s0(i) | c0(i), with c1_0(-1) = 0.
// Because the input carry is fixed, bit 0 needs no gate at all: it is the
// half-carry c0(0). The chain ripples through the remaining N-1 bits.
//
// Interface: s0, c0 in (from the half-sum generator); c1_0 out, N bits.
// Purely combinational. The equations follow the source design. s0(0)
// is unused by construction (bit 0 needs no gate), which lint reports.
module csla_cg0 #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] s0,
  input  logic [N-1:0] c0,
  output logic [N-1:0] c1_0
);

  assign c1_0[0] = c0[0];

  for (genvar i = 1; i < N; i++) begin : g_bit
    assign c1_0[i] = (c1_0[i-1] & s0[i]) | c0[i];
  end

endmodule
