// tb_csla_hsg -- exhaustive self-check of the half-sum generator at N=8.
// Every pair (a, b) is applied; bit i of s0 must be the parity of a(i),b(i)
// and bit i of c0 must be set exactly when both are 1, which the bench works
// out one bit at a time by counting ones.
module tb_csla_hsg;
  localparam int unsigned N = 8;
  logic [N-1:0] a, b, s0, c0;
  int checks = 0, failures = 0;

  csla_hsg #(.N(N)) dut (.a(a), .b(b), .s0(s0), .c0(c0));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << N); i++) begin
      for (int j = 0; j < (1 << N); j++) begin
        a = N'(i);
        b = N'(j);
        #1;
        for (int k = 0; k < N; k++) begin
          int ones;
          ones = int'(a[k]) + int'(b[k]);
          checks++;
          if (s0[k] != (ones == 1) || c0[k] != (ones == 2)) begin
            failures++;
            if (failures < 10) $display("FAIL a=%h b=%h bit %0d: s0=%b c0=%b", a, b, k, s0[k], c0[k]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
