// tb_k1_comb: exhaustive check of K1 on every proper state code and input,
// plus its behaviour on non-code states: an all-zero state must give all
// zero outputs, and states with extra ones may only add ones (monotone,
// unidirectional), never remove the outputs of the covered transitions.
module tb_k1_comb;
  import tb_ref_pkg::*;

  logic [1:0] x;
  logic [3:0] z;
  logic [5:0] y;
  logic [3:0] zn;
  int checks = 0, failures = 0;

  k1_comb dut (.x(x), .z(z), .y_o(y), .z_o(zn));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: x=%b z=%b y=%b zn=%b", what, x, z, y, zn);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Proper codes: exact outputs.
    for (int s = 0; s < 6; s++) begin
      for (int xv = 0; xv < 4; xv++) begin
        int n;
        logic [2:0] yy;
        x = 2'(xv);
        z = REF_CODE[s];
        #1;
        n  = ref_next(s, x);
        yy = 3'(n);
        check(y == {~yy, yy}, "output code word");
        check(zn == REF_CODE[n], "next state");
        check(popcount(32'(y)) == 3, "output weight");
      end
    end
    // Non-code states: monotone behaviour.
    for (int c = 0; c < 16; c++) begin
      if (ref_index(4'(c)) >= 0) continue;
      for (int xv = 0; xv < 4; xv++) begin
        logic [5:0] y_or;
        logic [3:0] z_or;
        y_or = '0;
        z_or = '0;
        for (int s = 0; s < 6; s++) begin
          if ((4'(c) & REF_CODE[s]) == REF_CODE[s]) begin
            int n;
            n = ref_next(s, 2'(xv));
            y_or |= {~3'(n), 3'(n)};
            z_or |= REF_CODE[n];
          end
        end
        x = 2'(xv);
        z = 4'(c);
        #1;
        check(y == y_or && zn == z_or, "non-code state gives OR of covered transitions");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
