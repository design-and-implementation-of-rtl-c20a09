// csla_cs -- carry selection (CS) unit of the proposed carry-select adder.
//
// Selects the final carry word c from the two precomputed carry words:
// c1_0 when cin = 0, c1_1 when cin = 1. c(N-1) is the adder's output carry,
// available here before the final sum is formed.
//
// A plain 2-to-1 multiplexer would do, but the two carry words always obey
// c1_0(i) -> c1_1(i) (a carry that appears with input carry 0 also appears
// with input carry 1), so the selection reduces to one AND-OR per bit:
// c = c1_0 | (cin & c1_1). That reduction, derived from the carry equations,
// is the optimisation the source design applies to this unit; the assertion
// below states the rule it relies on.
//
// Interface: c1_0, c1_1 (N bits), cin in; c (N bits), cout out.
// Purely combinational.
module csla_cs #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] c1_0,
  input  logic [N-1:0] c1_1,
  input  logic         cin,
  output logic [N-1:0] c,
  output logic         cout
);

  always_comb begin
    c    = c1_0 | ({N{cin}} & c1_1);
    cout = c[N-1];
  end

  // The carry words from CG0 and CG1 must be ordered bitwise.
  always_comb
    assert ((c1_0 & ~c1_1) == '0)
      else $error("csla_cs: c1_0 has a bit set where c1_1 does not (%h, %h)", c1_0, c1_1);

endmodule
