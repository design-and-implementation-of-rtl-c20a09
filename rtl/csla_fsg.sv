// csla_fsg -- final-sum generator (FSG) of the proposed carry-select adder.
//
// Forms the sum from the half-sum word and the selected carry word:
// s(0) = s0(0) ^ cin, s(i) = s0(i) ^ c(i-1). Only c(N-2:0) is used; the top
// carry bit is the adder's output carry and leaves through the CS unit.
//
// Interface: s0 (N bits), c (N bits, bit N-1 ignored), cin in; s (N bits)
// out. Purely combinational, one XOR level. Follows the source design.
// The lint tool reports c[N-1] as unused;
// that is intended, the port keeps the full carry word for a uniform
// interface.
module csla_fsg #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] s0,
  input  logic [N-1:0] c,
  input  logic         cin,
  output logic [N-1:0] s
);

  assign s[0] = s0[0] ^ cin;

  for (genvar i = 1; i < N; i++) begin : g_bit
    assign s[i] = s0[i] ^ c[i-1];
  end

endmodule
