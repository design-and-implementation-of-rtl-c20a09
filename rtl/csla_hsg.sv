// csla_hsg -- half-sum generator (HSG) of the proposed carry-select adder.
//
// Produces, bit by bit, the half-sum s0 = a ^ b and the half-carry
// c0 = a & b of the two N-bit operands. Both carry generators and the
// final-sum generator of the adder share these two words, which is what
// removes the second ripple-carry adder of a conventional CSLA.
//
// Interface: a, b in; s0, c0 out, all N bits. Purely combinational, one
// gate level. Function and structure follow the source design.
module csla_hsg #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] s0,
  output logic [N-1:0] c0
);

  always_comb begin
    s0 = a ^ b;
    c0 = a & b;
  end

endmodule
