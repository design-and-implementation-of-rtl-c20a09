// tb_sqrt_csla_widths -- the square-root CSLA at the smaller widths of the
// evaluated family: 8, 16, 32 and 64 bits (the 128-bit default has its own
// bench).
//
// The 16-bit layout must be the published arrangement: a 2-bit ripple stage
// on bits 1:0, then carry-select stages on bits 3:2, 6:4, 10:7 and 15:11.
// The 8-, 32- and 64-bit layouts are checked against the growth rule
// (2, 2, 3, ... and a remainder stage). Each adder is then driven
// exhaustively on its low byte pattern corners and with random and
// carry-chain operands; {cout, s} must equal the integer sum a + b + cin.
module tb_sqrt_csla_widths;
  import csla_pkg::*;

  logic [63:0] a, b;
  logic        cin;
  logic [7:0]  s8;
  logic [15:0] s16;
  logic [31:0] s32;
  logic [63:0] s64;
  logic        co8, co16, co32, co64;
  int checks = 0, failures = 0;

  sqrt_csla #(.N(8))  dut8  (.a(a[7:0]),  .b(b[7:0]),  .cin(cin), .s(s8),  .cout(co8));
  sqrt_csla #(.N(16)) dut16 (.a(a[15:0]), .b(b[15:0]), .cin(cin), .s(s16), .cout(co16));
  sqrt_csla #(.N(32)) dut32 (.a(a[31:0]), .b(b[31:0]), .cin(cin), .s(s32), .cout(co32));
  sqrt_csla #(.N(64)) dut64 (.a(a),       .b(b),       .cin(cin), .s(s64), .cout(co64));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_layout(input int unsigned n, input int unsigned exp_w[], input string tag);
    checks++;
    if (num_stages(n, 2) != exp_w.size()) begin
      failures++;
      $display("FAIL %s: %0d stages, want %0d", tag, num_stages(n, 2), exp_w.size());
    end
    foreach (exp_w[k]) begin
      checks++;
      if (stage_width(n, 2, k) != exp_w[k]) begin
        failures++;
        $display("FAIL %s: stage %0d is %0d bits, want %0d", tag, k, stage_width(n, 2, k), exp_w[k]);
      end
    end
  endtask

  task automatic apply(input logic [63:0] va, input logic [63:0] vb, input logic vc);
    logic [8:0]  t8;
    logic [16:0] t16;
    logic [32:0] t32;
    logic [64:0] t64;
    a   = va;
    b   = vb;
    cin = vc;
    #1;
    t8  = {1'b0, va[7:0]} + {1'b0, vb[7:0]} + 9'(vc);
    t16 = {1'b0, va[15:0]} + {1'b0, vb[15:0]} + 17'(vc);
    t32 = {1'b0, va[31:0]} + {1'b0, vb[31:0]} + 33'(vc);
    t64 = {1'b0, va} + {1'b0, vb} + 65'(vc);
    checks += 4;
    if ({co8, s8} !== t8) begin
      failures++;
      if (failures < 10) $display("FAIL N=8 a=%h b=%h cin=%b", va[7:0], vb[7:0], vc);
    end
    if ({co16, s16} !== t16) begin
      failures++;
      if (failures < 10) $display("FAIL N=16 a=%h b=%h cin=%b", va[15:0], vb[15:0], vc);
    end
    if ({co32, s32} !== t32) begin
      failures++;
      if (failures < 10) $display("FAIL N=32 a=%h b=%h cin=%b", va[31:0], vb[31:0], vc);
    end
    if ({co64, s64} !== t64) begin
      failures++;
      if (failures < 10) $display("FAIL N=64 a=%h b=%h cin=%b", va, vb, vc);
    end
  endtask

  initial begin
    check_layout(8, '{2, 2, 3, 1}, "8-bit");
    check_layout(16, '{2, 2, 3, 4, 5}, "16-bit");
    check_layout(32, '{2, 2, 3, 4, 5, 6, 7, 3}, "32-bit");
    check_layout(64, '{2, 2, 3, 4, 5, 6, 7, 8, 9, 10, 8}, "64-bit");
    // Published 16-bit stage boundaries.
    begin
      int unsigned lsb16[5] = '{0, 2, 4, 7, 11};
      foreach (lsb16[k]) begin
        checks++;
        if (stage_lsb(16, 2, k) != lsb16[k]) begin
          failures++;
          $display("FAIL 16-bit stage %0d starts at %0d", k, stage_lsb(16, 2, k));
        end
      end
    end

    // All-ones, all-zeros and single-bit corners.
    apply('1, '0, 1'b1);
    apply('1, '1, 1'b1);
    apply('0, '0, 1'b0);
    for (int k = 0; k < 64; k++) begin
      apply(64'd1 << k, 64'd1 << k, 1'b0);
      apply(~(64'd1 << k), 64'd1 << k, 1'b1);
    end
    // Exhaustive over the 16-bit adder's low 8 bits with the rest all ones,
    // so that every local carry reaches the top.
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        apply({56'hFF_FFFF_FFFF_FFFF, 8'(i)}, {56'h0, 8'(j)}, 1'(i ^ j));
      end
    repeat (30000) begin
      logic [63:0] r;
      r = {$urandom, $urandom};
      apply(r, ~r ^ ({$urandom, $urandom} & {$urandom, $urandom} & {$urandom, $urandom}),
            1'($urandom));
      apply({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
