// sqrt_csla -- N-bit square-root carry-select adder built from the
// proposed CSLA (default N = 128).
//
// The operands are cut into stages: a FIRST_W-bit ripple-carry adder at the
// least-significant end, then proposed carry-select stages of width
// 2, 3, 4, ... (see csla_pkg for the exact rule; 2,2,3,...,15,7 at N=128,
// 2,2,3,4,5 at N=16). Every stage computes its local carry words from its
// own operand bits in parallel with the others; the carry arriving from the
// stage below only drives the stage's carry-select AND-OR and its final XORs.
// Widening the stages towards the top balances the local ripple time of a
// stage against the arrival time of its input carry, so the critical path
// grows roughly with the square root of N rather than with N.
//
// Interface: a, b (N bits), cin in; s (N bits), cout out (the symbol of the
// 128-bit adder has ports A, B, CIN, S, COUT). Purely combinational.
// The stage arrangement at N=16 and the use of the proposed CSLA as stage
// follow the source design; the widths chosen for larger N are this
// design's own continuation of the same rule.
module sqrt_csla
  import csla_pkg::*;
#(
  parameter int unsigned N       = 128,
  parameter int unsigned FIRST_W = 2
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);

  localparam int unsigned NS = num_stages(N, FIRST_W);

  // carry[k] is the carry into stage k; carry[NS] is the adder's carry out.
  logic [NS:0] carry;

  assign carry[0] = cin;
  assign cout     = carry[NS];

  for (genvar k = 0; k < NS; k++) begin : g_stage
    localparam int unsigned W   = stage_width(N, FIRST_W, k);
    localparam int unsigned LSB = stage_lsb(N, FIRST_W, k);
    if (k == 0) begin : g_rca
      rca #(.N(W)) u_rca (
        .a   (a[LSB +: W]),
        .b   (b[LSB +: W]),
        .cin (carry[k]),
        .s   (s[LSB +: W]),
        .cout(carry[k+1])
      );
    end else begin : g_csla
      prop_csla #(.N(W)) u_csla (
        .a   (a[LSB +: W]),
        .b   (b[LSB +: W]),
        .cin (carry[k]),
        .s   (s[LSB +: W]),
        .cout(carry[k+1])
      );
    end
  end

  if (N < 1 || FIRST_W < 1) begin : g_bad_param
    $error("sqrt_csla: N and FIRST_W must be at least 1");
  end

endmodule
