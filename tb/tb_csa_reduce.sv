// tb_csa_reduce: checks that the 3:2 counter tree keeps the sum of its
// operands (out_a + out_b == sum of inputs mod 2^W) for 1, 4, 5 and 16
// operands with random data.
module tb_csa_reduce;
  int checks = 0, failures = 0;

  logic [27:0] o4 [4];  logic [27:0] a4, b4;
  logic [27:0] o5 [5];  logic [27:0] a5, b5;
  logic [30:0] o16 [16]; logic [30:0] a16, b16;
  logic [15:0] o1 [1];  logic [15:0] a1, b1;

  csa_reduce #(.M(4),  .W(28)) dut4  (.ops(o4),  .out_a(a4),  .out_b(b4));
  csa_reduce #(.M(5),  .W(28)) dut5  (.ops(o5),  .out_a(a5),  .out_b(b5));
  csa_reduce #(.M(16), .W(31)) dut16 (.ops(o16), .out_a(a16), .out_b(b16));
  csa_reduce #(.M(1),  .W(16)) dut1  (.ops(o1),  .out_a(a1),  .out_b(b1));

  initial begin
    logic [27:0] s4, s5;
    logic [30:0] s16;
    for (int it = 0; it < 3000; it++) begin
      s4 = '0; s5 = '0; s16 = '0;
      foreach (o4[i])  begin o4[i]  = 28'({$urandom, $urandom}); s4 += o4[i]; end
      foreach (o5[i])  begin o5[i]  = (it % 2) ? '1 : 28'({$urandom, $urandom}); s5 += o5[i]; end
      foreach (o16[i]) begin o16[i] = 31'($urandom); s16 += o16[i]; end
      o1[0] = 16'($urandom);
      #1;
      checks += 4;
      if (28'(a4 + b4) != s4)   begin failures++; $display("FAIL M=4");  end
      if (28'(a5 + b5) != s5)   begin failures++; $display("FAIL M=5");  end
      if (31'(a16 + b16) != s16) begin failures++; $display("FAIL M=16"); end
      if (a1 != o1[0] || b1 != '0) begin failures++; $display("FAIL M=1"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
