// tb_k2_comb: exhaustive check of K2 on every proper state code and input;
// non-code states must give y'' = 0 and the code of state 0.
module tb_k2_comb;
  import tb_ref_pkg::*;

  logic [1:0] x;
  logic [3:0] z;
  logic [2:0] y;
  logic [3:0] zn;
  int checks = 0, failures = 0;

  k2_comb dut (.x(x), .z(z), .y_o(y), .z_o(zn));

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
    for (int c = 0; c < 16; c++) begin
      for (int xv = 0; xv < 4; xv++) begin
        int s;
        x = 2'(xv);
        z = 4'(c);
        #1;
        s = ref_index(4'(c));
        if (s >= 0) begin
          check(y == 3'(ref_next(s, x)), "output");
          check(zn == REF_CODE[ref_next(s, x)], "next state");
        end else begin
          check(y == 3'b000 && zn == REF_CODE[0], "non-code state");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
