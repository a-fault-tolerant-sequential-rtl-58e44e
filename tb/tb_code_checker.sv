// tb_code_checker: exhaustive check of the 3-out-of-7 checker (default) and
// of a 4-out-of-7 instance (the weight used with odd-weight state codes):
// u must be 2'b10 exactly for words of the right weight.
module tb_code_checker;
  logic [6:0] v;
  logic [1:0] u3, u4;
  int checks = 0, failures = 0;
  int n_code = 0;

  code_checker dut3 (.v(v), .u(u3));
  code_checker #(.WIDTH(7), .WEIGHT(4)) dut4 (.v(v), .u(u4));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < 128; w++) begin
      int n;
      v = 7'(w);
      #1;
      n = 0;
      for (int i = 0; i < 7; i++) n += (w >> i) & 1;
      checks += 2;
      if ((u3 == 2'b10) != (n == 3)) begin failures++; $display("FAIL 3/7: %b -> %b", v, u3); end
      if ((u4 == 2'b10) != (n == 4)) begin failures++; $display("FAIL 4/7: %b -> %b", v, u4); end
      if (u3 == 2'b10) n_code++;
    end
    // C(7,3) = 35 code words.
    checks++;
    if (n_code != 35) begin failures++; $display("FAIL code word count %0d", n_code); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
