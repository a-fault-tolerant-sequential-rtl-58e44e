// tb_parity_xor: exhaustive parity check of the XOR tree at its default
// width (4) and at an odd width (7).
module tb_parity_xor;
  logic [3:0] z4;
  logic [6:0] z7;
  logic p4, p7;
  int checks = 0, failures = 0;

  parity_xor dut4 (.z(z4), .par_o(p4));
  parity_xor #(.WIDTH(7)) dut7 (.z(z7), .par_o(p7));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 128; v++) begin
      int n4, n7;
      z4 = 4'(v);
      z7 = 7'(v);
      #1;
      n4 = 0; n7 = 0;
      for (int i = 0; i < 4; i++) n4 += (v >> i) & 1;
      for (int i = 0; i < 7; i++) n7 += (v >> i) & 1;
      checks += 2;
      if (p4 != 1'(n4 % 2)) begin failures++; $display("FAIL width 4: %b -> %b", z4, p4); end
      if (p7 != 1'(n7 % 2)) begin failures++; $display("FAIL width 7: %b -> %b", z7, p7); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
