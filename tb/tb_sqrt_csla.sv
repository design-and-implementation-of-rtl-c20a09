// tb_sqrt_csla -- end-to-end self-check of the 128-bit square-root CSLA at
// its default parameters.
//
// Reference: {cout, s} must equal a + b + cin, computed with 129-bit
// integer arithmetic in the bench. The bench also knows the expected stage
// boundaries of the 128-bit adder (2-bit ripple stage, then carry-select
// stages of 2, 3, ..., 15 bits and a final 7-bit stage) and checks the
// layout functions against them. From the reference carries it counts the
// mechanisms of the design and fails if one never occurs:
//   - every stage's carry select taken with carry-in 0 and with carry-in 1;
//   - a carry generated in one stage and consumed by the next (select 1);
//   - a carry rippling from the adder's carry-in through all 128 bits;
//   - an overflow (cout = 1) and a carry-out of 0.
// Vectors: corner cases, operands built from random runs of ones (to make
// long carry chains likely) and uniformly random operands.
module tb_sqrt_csla;
  import csla_pkg::*;

  localparam int unsigned N  = 128;
  localparam int unsigned NS = 16;
  localparam int unsigned EXP_LSB [NS] = '{0, 2, 4, 7, 11, 16, 22, 29, 37, 46,
                                           56, 67, 79, 92, 106, 121};

  logic [N-1:0] a, b, s;
  logic         cin, cout;
  int checks = 0, failures = 0;

  int sel0 [NS];     // stage saw carry-in 0
  int sel1 [NS];     // stage saw carry-in 1
  int full_ripple = 0, overflow = 0, no_overflow = 0;

  sqrt_csla dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] rand_word();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  // A word made of a few random runs of ones.
  function automatic logic [N-1:0] run_word();
    logic [N-1:0] w;
    int unsigned lo, len;
    w = '0;
    repeat (1 + $urandom_range(3)) begin
      lo  = $urandom_range(N - 1);
      len = $urandom_range(N - lo);
      for (int unsigned i = lo; i < lo + len; i++) w[i] = 1'b1;
    end
    return w;
  endfunction

  task automatic apply(input logic [N-1:0] va, input logic [N-1:0] vb, input logic vc);
    logic [N:0]   total;
    logic [N-1:0] cinto;   // carry into each bit position
    a   = va;
    b   = vb;
    cin = vc;
    #1;
    total = {1'b0, va} + {1'b0, vb} + (N+1)'(vc);
    cinto = total[N-1:0] ^ va ^ vb;
    checks++;
    if ({cout, s} !== total) begin
      failures++;
      if (failures < 10)
        $display("FAIL a=%h b=%h cin=%b: got %b_%h want %h", va, vb, vc, cout, s, total);
    end
    for (int k = 0; k < NS; k++) begin
      if (cinto[EXP_LSB[k]]) sel1[k]++; else sel0[k]++;
    end
    if (vc && (va ^ vb) == '1) full_ripple++;
    if (total[N]) overflow++; else no_overflow++;
  endtask

  initial begin
    foreach (sel0[k]) begin sel0[k] = 0; sel1[k] = 0; end

    // Stage layout of the 128-bit adder.
    checks++;
    if (num_stages(N, 2) != NS) begin
      failures++;
      $display("FAIL stage count %0d", num_stages(N, 2));
    end
    for (int k = 0; k < NS; k++) begin
      checks++;
      if (stage_lsb(N, 2, k) != EXP_LSB[k]) begin
        failures++;
        $display("FAIL stage %0d starts at %0d", k, stage_lsb(N, 2, k));
      end
    end

    // Corner cases.
    apply('0, '0, 1'b0);
    apply('0, '0, 1'b1);
    apply('1, '0, 1'b1);            // carry-in ripples through every bit
    apply('0, '1, 1'b1);
    apply('1, '1, 1'b0);
    apply('1, '1, 1'b1);
    apply('1, 128'd1, 1'b0);
    apply({1'b1, {(N-1){1'b0}}}, {1'b1, {(N-1){1'b0}}}, 1'b0);
    for (int k = 0; k < N; k++) begin
      logic [N-1:0] one;
      one = '0;
      one[k] = 1'b1;
      apply(one, one, 1'b0);        // carry generated at bit k only
      apply(~one, one, 1'b1);
      apply('1 >> (N - 1 - k), 128'd1, 1'b0);
    end

    // Random carry-chain patterns and uniform random operands.
    repeat (20000) begin
      logic [N-1:0] ra;
      ra = run_word();
      apply(ra, ~ra ^ (run_word() & run_word()), 1'($urandom));
      apply(run_word(), run_word(), 1'($urandom));
      apply(rand_word(), rand_word(), 1'($urandom));
    end

    for (int k = 0; k < NS; k++) begin
      checks++;
      if (sel0[k] == 0 || sel1[k] == 0) begin
        failures++;
        $display("FAIL stage %0d: carry-in 0 seen %0d times, 1 seen %0d times", k, sel0[k], sel1[k]);
      end
    end
    checks++;
    if (full_ripple == 0 || overflow == 0 || no_overflow == 0) begin
      failures++;
      $display("FAIL mechanism missing: full ripple %0d, overflow %0d, no overflow %0d",
               full_ripple, overflow, no_overflow);
    end
    $display("full ripple %0d, overflow %0d, no overflow %0d", full_ripple, overflow, no_overflow);
    for (int k = 0; k < NS; k++)
      $display("stage %0d (bit %0d): carry-in 0 x%0d, carry-in 1 x%0d", k, EXP_LSB[k], sel0[k], sel1[k]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
