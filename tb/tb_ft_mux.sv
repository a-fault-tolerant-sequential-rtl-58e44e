// tb_ft_mux: random data on both sources under all four checker values;
// only u = 2'b10 may select the FSSC1 side.
module tb_ft_mux;
  logic [1:0] u;
  logic [6:0] a, b, o;
  int checks = 0, failures = 0;

  ft_mux dut (.u(u), .a(a), .b(b), .o(o));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      u = 2'($urandom_range(0, 3));
      a = 7'($urandom);
      b = 7'($urandom);
      #1;
      checks++;
      if (o != ((u == 2'b10) ? a : b)) begin
        failures++;
        $display("FAIL u=%b a=%b b=%b o=%b", u, a, b, o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
