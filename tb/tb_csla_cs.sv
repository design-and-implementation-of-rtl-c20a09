// tb_csla_cs -- self-check of the carry selection unit at N=8.
// Carry word pairs are generated as a real adder would produce them
// (c1_0 a subset of c1_1): every c1_1 value with every subset pattern drawn
// from it, for both values of cin. The expected result is a plain 2-to-1
// selection, so the bench also confirms that the unit's AND-OR reduction
// equals the multiplexer it replaces.
module tb_csla_cs;
  localparam int unsigned N = 8;
  logic [N-1:0] c1_0, c1_1, c;
  logic         cin, cout;
  int checks = 0, failures = 0;

  csla_cs #(.N(N)) dut (.c1_0(c1_0), .c1_1(c1_1), .cin(cin), .c(c), .cout(cout));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << N); i++) begin
      for (int j = 0; j < (1 << N); j++) begin
        if ((j & ~i) != 0) continue;      // c1_0 must be a subset of c1_1
        for (int s = 0; s < 2; s++) begin
          logic [N-1:0] want;
          c1_1 = N'(i);
          c1_0 = N'(j);
          cin  = s[0];
          #1;
          want = cin ? c1_1 : c1_0;
          checks++;
          if (c !== want || cout !== want[N-1]) begin
            failures++;
            if (failures < 10) $display("FAIL c1_0=%h c1_1=%h cin=%b: c=%h cout=%b", c1_0, c1_1, cin, c, cout);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
