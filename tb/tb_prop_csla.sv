// tb_prop_csla -- exhaustive self-check of the prop_csla adder at N=8.
// All operand pairs with both carry-in values are applied and {cout, s} is
// compared with the integer sum a + b + cin.
module tb_prop_csla;
  localparam int unsigned N = 8;
  logic [N-1:0] a, b, s;
  logic         cin, cout;
  int checks = 0, failures = 0;

  prop_csla #(.N(N)) dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

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
          a   = N'(i);
          b   = N'(j);
          cin = ci[0];
          #1;
          checks++;
          if ({cout, s} !== (N+1)'(total)) begin
            failures++;
            if (failures < 10) $display("FAIL a=%h b=%h cin=%b: cout=%b s=%h", a, b, cin, cout, s);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
