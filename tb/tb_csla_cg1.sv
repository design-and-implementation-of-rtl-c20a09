// tb_csla_cg1 -- exhaustive self-check of carry generator CG1 at N=8.
// For every operand pair the bench feeds the half-sum and half-carry words
// and compares bit i of the carry word with the carry out of the (i+1)-bit
// sum a[i:0] + b[i:0] + 1, computed with integer addition.
module tb_csla_cg1;
  localparam int unsigned N = 8;
  logic [N-1:0] a, b, s0, c0, cw;
  int checks = 0, failures = 0;

  csla_cg1 #(.N(N)) dut (.s0(s0), .c0(c0), .c1_1(cw));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << N); i++) begin
      for (int j = 0; j < (1 << N); j++) begin
        a  = N'(i);
        b  = N'(j);
        s0 = a ^ b;
        c0 = a & b;
        #1;
        for (int k = 0; k < N; k++) begin
          int mask, ref_c;
          mask  = (1 << (k + 1)) - 1;
          ref_c = ((i & mask) + (j & mask) + 1) >> (k + 1);
          checks++;
          if (cw[k] != ref_c[0]) begin
            failures++;
            if (failures < 10) $display("FAIL a=%h b=%h bit %0d: got %b want %b", a, b, k, cw[k], ref_c[0]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
