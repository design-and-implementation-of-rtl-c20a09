// prop_csla -- the proposed N-bit carry-select adder.
//
// A conventional CSLA runs two ripple-carry adders (input carry 0 and 1)
// and multiplexes sums and carries. Here the work is reorganised:
//   HSG : s0 = a ^ b, c0 = a & b, computed once and shared;
//   CG0 : carry word for input carry 0, CG1 : for input carry 1, both
//         rippling only the carry (no sums), each simplified by its fixed
//         input carry;
//   CS  : selects the carry word with cin (one AND-OR per bit);
//   FSG : s = s0 ^ {c[N-2:0], cin}.
// The carry is selected before any sum bit is formed, so the output carry
// is ready one XOR level earlier than the sum. That early carry is what
// makes the block suitable as a stage of the square-root CSLA.
//
// Interface: a, b (N bits), cin in; s (N bits), cout out. Purely
// combinational; s and cout are valid once the inputs have settled.
// Structure and equations follow the source design.
module prop_csla #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);

  logic [N-1:0] s0, c0;      // half-sum and half-carry words
  logic [N-1:0] c1_0, c1_1;  // carry words for input carry 0 and 1
  logic [N-1:0] c;           // selected carry word

  csla_hsg #(.N(N)) u_hsg (.a(a), .b(b), .s0(s0), .c0(c0));
  csla_cg0 #(.N(N)) u_cg0 (.s0(s0), .c0(c0), .c1_0(c1_0));
  csla_cg1 #(.N(N)) u_cg1 (.s0(s0), .c0(c0), .c1_1(c1_1));
  csla_cs  #(.N(N)) u_cs  (.c1_0(c1_0), .c1_1(c1_1), .cin(cin), .c(c), .cout(cout));
  csla_fsg #(.N(N)) u_fsg (.s0(s0), .c(c), .cin(cin), .s(s));

endmodule
