// tb_csla_fsg -- exhaustive self-check of the final-sum generator at N=8.
// The half-sum and carry words are derived from an operand pair and a
// carry-in exactly as the adder would see them; the sum must equal the low
// N bits of a + b + cin computed with integer addition.
module tb_csla_fsg;
  localparam int unsigned N = 8;
  logic [N-1:0] s0, c, s;
  logic         cin;
  int checks = 0, failures = 0;

  csla_fsg #(.N(N)) dut (.s0(s0), .c(c), .cin(cin), .s(s));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << N); i++)
      for (int j = 0; j < (1 << N); j++)
        for (int ci = 0; ci < 2; ci++) begin
          int total;
          total = i + j + ci;
          s0  = N'(i ^ j);
          cin = ci[0];
          // carry out of bit k is bit k+1 of the carries into each position
          c   = N'(((total ^ i ^ j) >> 1));
          #1;
          checks++;
          if (s !== N'(total)) begin
            failures++;
            if (failures < 10) $display("FAIL a=%0d b=%0d cin=%0d: s=%h", i, j, ci, s);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
