// rca -- N-bit ripple-carry adder with input carry.
//
// Each bit forms its half sum and half carry, then the full sum
// s(i) = a(i) ^ b(i) ^ c(i-1) and the full carry
// c(i) = a(i)&b(i) | (a(i)^b(i)) & c(i-1), with c(-1) = cin. In the
// square-root CSLA it is the 2-bit least-significant stage, where the
// input carry is the adder's own cin and a carry-select stage would buy
// nothing.
//
// Interface: a, b (N bits), cin in; s (N bits), cout out. Purely
// combinational; delay grows linearly with N. Follows the source design.
module rca #(
  parameter int unsigned N = 2
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);

  logic [N:0] c;   // c[i] is the carry into bit i

  assign c[0] = cin;
  assign cout = c[N];

  for (genvar i = 0; i < N; i++) begin : g_bit
    logic hs, hc;  // half sum and half carry of bit i
    assign hs     = a[i] ^ b[i];
    assign hc     = a[i] & b[i];
    assign s[i]   = hs ^ c[i];
    assign c[i+1] = hc | (hs & c[i]);
  end

endmodule
